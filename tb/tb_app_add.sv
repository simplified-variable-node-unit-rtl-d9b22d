// tb_app_add: random vectors; checks the saturated sum of every entry and
// that saturation was exercised.
module tb_app_add;
  localparam int Q = 32, W = 5;
  int checks = 0, failures = 0, sats = 0;
  logic [Q-1:0][W-1:0] qn, r, qa;

  app_add #(.Q(Q), .W(W)) dut (.qn(qn), .r_new(r), .qa(qa));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int s;
      for (int a = 0; a < Q; a++) begin qn[a] = W'($urandom); r[a] = W'($urandom); end
      #1;
      for (int a = 0; a < Q; a++) begin
        s = int'(qn[a]) + int'(r[a]);
        if (s > 31) begin s = 31; sats++; end
        checks++;
        if (int'(qa[a]) != s) failures++;
      end
    end
    checks++;
    if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
