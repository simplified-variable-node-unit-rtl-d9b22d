// tb_dn: full decompression network for DC columns: random compressed check
// node words; every normal-domain message R_n(a) must equal the simplified
// delta-domain message of column n at index a ^ z_n*.
module tb_dn;
  import tb_ref_pkg::*;
  localparam int P = 5, W = 5, DC = 27, Q = 1 << P, CW = $clog2(DC + 1);
  int checks = 0, failures = 0;
  logic [DC-1:0][P-1:0]        zs;
  logic [Q-1:0][W-1:0]         e;
  logic [P-1:0][W-1:0]         bs_m1;
  logic [P-1:0][CW-1:0]        bs_col;
  logic [P-1:0][P-1:0]         bs_sym;
  logic [DC-1:0][Q-1:0][W-1:0] r;

  dn #(.P(P), .W(W), .DC(DC)) dut (.zs(zs), .e(e), .bs_m1(bs_m1), .bs_col(bs_col),
                                   .bs_sym(bs_sym), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      int basis[8], m[8], c[8];
      for (int i = 0; i < P; i++) begin
        int x;
        do x = int'($urandom_range(Q - 1, 1)); while (in_span(x, basis, i));
        basis[i] = x;
        bs_sym[i] = P'(x);
        m[i] = (i == 0) ? int'($urandom_range(5)) : m[i-1] + int'($urandom_range(5));
        bs_m1[i] = W'(m[i]);
        c[i] = int'($urandom_range(DC - 1));
        bs_col[i] = CW'(c[i]);
      end
      for (int a = 0; a < Q; a++) e[a] = (a == 0) ? '0 : W'($urandom);
      for (int n = 0; n < DC; n++) zs[n] = P'($urandom);
      #1;
      for (int n = 0; n < DC; n++)
        for (int a = 0; a < Q; a++) begin
          automatic int da = a ^ int'(zs[n]);
          automatic int ref_v = (da == 0) ? 0 : ref_c2v(da, n, basis, m, c, int'(e[da]), P);
          checks++;
          if (int'(r[n][a]) != ref_v) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
