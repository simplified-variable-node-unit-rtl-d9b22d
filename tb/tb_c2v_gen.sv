// tb_c2v_gen: drives the C2V generator with path information from the path
// generator and random basic sets, complements and column indices, and
// compares every message with the simplified rule: complement when the
// path deviates in this column, else m1_l* for a basic-set element and
// m1_p* for all others. Counts both outcomes.
module tb_c2v_gen;
  import tb_ref_pkg::*;
  localparam int P = 5, W = 5, DC = 27, Q = 1 << P, CW = $clog2(DC + 1);
  int checks = 0, failures = 0, n_e = 0, n_q = 0;
  logic [P-1:0][P-1:0]         bs_sym;
  logic [P-1:0][W-1:0]         bs_m1;
  logic [P-1:0][CW-1:0]        bs_col;
  logic [Q-1:0][P-1:0][CW-1:0] d;
  logic [Q-1:0][W-1:0]         e, dr;
  logic [CW-1:0]               n;

  dn_path #(.P(P), .DC(DC)) u_path (.bs_sym(bs_sym), .bs_col(bs_col), .d(d));
  c2v_gen #(.P(P), .W(W), .DC(DC)) dut (.n(n), .bs_sym(bs_sym), .bs_m1(bs_m1), .d(d),
                                        .e(e), .dr(dr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int basis[8], m[8], c[8];
      for (int i = 0; i < P; i++) begin
        int x;
        do x = int'($urandom_range(Q - 1, 1)); while (in_span(x, basis, i));
        basis[i] = x;
        bs_sym[i] = P'(x);
        m[i] = (i == 0) ? int'($urandom_range(5)) : m[i-1] + int'($urandom_range(5));
        bs_m1[i] = W'(m[i]);
        c[i] = int'($urandom_range(3));   // few columns: hits are frequent
        bs_col[i] = CW'(c[i]);
      end
      for (int a = 0; a < Q; a++) e[a] = W'($urandom);
      n = CW'($urandom_range(3));
      #1;
      checks++;
      if (dr[0] != '0) failures++;
      for (int a = 1; a < Q; a++) begin
        automatic int r = ref_c2v(a, int'(n), basis, m, c, int'(e[a]), P);
        checks++;
        if (int'(dr[a]) != r) failures++;
        if (r == int'(e[a])) n_e++; else n_q++;
      end
    end
    checks++;
    if (n_e == 0 || n_q == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
