// tb_cnp_phi: random m1 rows (with ties and with dependent small elements);
// the basic set must be the greedy minimum independent set in ascending m1
// order, with the matching columns.
module tb_cnp_phi;
  import tb_ref_pkg::*;
  localparam int P = 5, W = 5, DC = 27, Q = 1 << P, CW = $clog2(DC + 1);
  int checks = 0, failures = 0;
  logic [Q-1:0][W-1:0]  m1;
  logic [Q-1:0][CW-1:0] icol;
  logic [P-1:0][W-1:0]  bs_m1;
  logic [P-1:0][CW-1:0] bs_col;
  logic [P-1:0][P-1:0]  bs_sym;

  cnp_phi #(.P(P), .W(W), .DC(DC)) dut (.m1(m1), .icol(icol), .bs_m1(bs_m1),
                                        .bs_col(bs_col), .bs_sym(bs_sym));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int rm1[64], rcol[64], s[8], v[8], c[8];
      for (int a = 0; a < Q; a++) begin
        m1[a]   = (t % 3 == 0) ? W'($urandom_range(3)) : W'($urandom);
        icol[a] = CW'($urandom_range(DC - 1));
      end
      if (t % 3 == 1) begin  // 1, 2 and 3 = 1^2 cheapest: 3 must be skipped
        m1[1] = 0; m1[2] = 1; m1[3] = 1;
      end
      #1;
      for (int a = 0; a < Q; a++) begin rm1[a] = int'(m1[a]); rcol[a] = int'(icol[a]); end
      ref_phi(rm1, rcol, P, s, v, c);
      for (int i = 0; i < P; i++) begin
        checks += 3;
        if (int'(bs_sym[i]) != s[i]) failures++;
        if (int'(bs_m1[i])  != v[i]) failures++;
        if (int'(bs_col[i]) != c[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
