// tb_gf_perm: checks P (dout[a] = din[h*a]) and P^-1 (dout[a] = din[h^-1*a])
// for random vectors and every exponent, against field multiplication by
// shift-and-reduce, and that P^-1 undoes P.
module tb_gf_perm;
  import tb_ref_pkg::*;
  localparam int P = 5, W = 5, Q = 1 << P;
  int checks = 0, failures = 0;
  logic [Q-1:0][W-1:0] din, dp, dpi, back;
  logic [P-1:0] hexp;

  gf_perm #(.P(P), .W(W), .INVERSE(1'b0)) u_p    (.din(din), .hexp(hexp), .dout(dp));
  gf_perm #(.P(P), .W(W), .INVERSE(1'b1)) u_pinv (.din(din), .hexp(hexp), .dout(dpi));
  gf_perm #(.P(P), .W(W), .INVERSE(1'b1)) u_back (.din(dp),  .hexp(hexp), .dout(back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int h, hi;
      for (int a = 0; a < Q; a++) din[a] = W'($urandom);
      hexp = P'(t % (Q - 1));
      #1;
      h  = gf_alpha(int'(hexp), P);
      hi = gf_inv(h, P);
      for (int a = 0; a < Q; a++) begin
        checks += 3;
        if (dp[a]  !== din[gf_mul(h, a, P)])  failures++;
        if (dpi[a] !== din[gf_mul(hi, a, P)]) failures++;
        if (back[a] !== din[a]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
