// tb_v2c_sub: random and extreme vectors; the signed difference must be
// exact, and saturated inputs must pass unchanged.
module tb_v2c_sub;
  localparam int Q = 32, W = 5;
  int checks = 0, failures = 0;
  logic        [Q-1:0][W-1:0] qp, r;
  logic signed [Q-1:0][W:0]   qt;

  v2c_sub #(.Q(Q), .W(W)) dut (.qp(qp), .r_old(r), .qt(qt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int a = 0; a < Q; a++) begin
        qp[a] = (t == 0) ? '0 : (t == 1) ? '1 : W'($urandom);
        r[a]  = (t == 0) ? '1 : (t == 1) ? '0 : W'($urandom);
      end
      #1;
      for (int a = 0; a < Q; a++) begin
        checks++;
        if (int'($signed(qt[a])) != ((qp[a] == '1) ? 31 : int'(qp[a]) - int'(r[a]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
