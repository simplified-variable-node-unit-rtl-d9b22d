// tb_cnp: random normalized V2C vectors; checks z*, E(a) and B* of the check
// node processor against a reference built from the delta transform,
// syndrome, Psi, Phi and the complement rule (m2 for basic-set elements,
// m1 otherwise).
module tb_cnp;
  import tb_ref_pkg::*;
  localparam int P = 5, W = 5, DC = 27, Q = 1 << P, CW = $clog2(DC + 1);
  int checks = 0, failures = 0;
  logic [DC-1:0][Q-1:0][W-1:0] qmn;
  logic [DC-1:0][P-1:0]        z, zs;
  logic [Q-1:0][W-1:0]         e;
  logic [P-1:0][W-1:0]         bs_m1;
  logic [P-1:0][CW-1:0]        bs_col;
  logic [P-1:0][P-1:0]         bs_sym;

  cnp #(.P(P), .W(W), .DC(DC)) dut (.qmn(qmn), .z(z), .zs(zs), .e(e), .bs_m1(bs_m1),
                                    .bs_col(bs_col), .bs_sym(bs_sym));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 60; t++) begin
      int beta, rm1[64], rcol[64], rm2[64], s[8], v[8], c[8];
      beta = 0;
      for (int j = 0; j < DC; j++) begin
        z[j] = P'($urandom);
        beta ^= int'(z[j]);
        for (int a = 0; a < Q; a++) qmn[j][a] = W'($urandom_range(8) + 1 + (t % 4) * 6);
        qmn[j][z[j]] = '0;
      end
      #1;
      for (int a = 0; a < Q; a++) begin
        int col[32];
        for (int j = 0; j < DC; j++) col[j] = int'(qmn[j][a ^ int'(z[j])]);
        ref_psi(col, DC, rm1[a], rcol[a], rm2[a]);
      end
      ref_phi(rm1, rcol, P, s, v, c);
      for (int j = 0; j < DC; j++) begin
        checks++;
        if (int'(zs[j]) != (int'(z[j]) ^ beta)) failures++;
      end
      for (int i = 0; i < P; i++) begin
        checks += 3;
        if (int'(bs_sym[i]) != s[i] || int'(bs_m1[i]) != v[i]) failures++;
        if (int'(bs_col[i]) != c[i]) failures++;
        if (int'(e[s[i]]) != rm2[s[i]]) failures++;
      end
      for (int a = 1; a < Q; a++) begin
        automatic bit bs = 0;
        for (int i = 0; i < P; i++) if (s[i] == a) bs = 1;
        checks++;
        if (int'(e[a]) != (bs ? rm2[a] : rm1[a])) failures++;
      end
      checks++;
      if (e[0] != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
