// tb_delta2normal: random vectors and offsets; r[a] must equal dr[a ^ zs].
module tb_delta2normal;
  localparam int P = 5, W = 5, Q = 1 << P;
  int checks = 0, failures = 0;
  logic [Q-1:0][W-1:0] dr, r;
  logic [P-1:0] zs;

  delta2normal #(.P(P), .W(W)) dut (.dr(dr), .zs(zs), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int a = 0; a < Q; a++) dr[a] = W'($urandom);
      zs = P'(t);
      #1;
      for (int a = 0; a < Q; a++) begin
        checks++;
        if (r[a] !== dr[a ^ int'(zs)]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
