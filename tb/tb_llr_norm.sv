// tb_llr_norm: random signed vectors; checks the hard decision (first
// minimum) and every normalized, saturated entry.
module tb_llr_norm;
  localparam int P = 5, W = 5, Q = 1 << P;
  int checks = 0, failures = 0;
  logic signed [Q-1:0][W:0]   qt;
  logic        [Q-1:0][W-1:0] qn;
  logic        [P-1:0]        z;

  llr_norm #(.P(P), .W(W)) dut (.qt(qt), .qn(qn), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int mn, zi, v;
      for (int a = 0; a < Q; a++)
        qt[a] = (W+1)'($signed(int'($urandom_range(62)) - 31) >>> ((t % 3 == 0) ? 2 : 0));
      #1;
      mn = 1000; zi = 0;
      for (int a = 0; a < Q; a++) if (int'($signed(qt[a])) < mn) begin mn = int'($signed(qt[a])); zi = a; end
      checks++;
      if (int'(z) != zi) failures++;
      for (int a = 0; a < Q; a++) begin
        v = int'($signed(qt[a])) - mn;
        if (v > 31) v = 31;
        checks++;
        if (int'(qn[a]) != v) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
