// tb_decoder_ref: bit-exact end-to-end check of the decoder against a
// behavioural model of the algorithm (see ref_harness), at two sizes:
// GF(8) with a 3 x 5 array of circulants and 4 iterations (6 frames), and
// the default GF(32) (837,726) configuration at 8 iterations (2 frames).
module tb_decoder_ref;
  logic clk = 0;
  int   c_s, f_s, c_l, f_l;
  logic fin_s, fin_l;

  always #5 clk = ~clk;

  ref_harness #(.P(3), .W(5), .DC(5), .DV(3), .IMAX(4), .NFRAMES(6)) u_small (
    .clk(clk), .checks(c_s), .failures(f_s), .fin(fin_s));
  ref_harness #(.P(5), .W(5), .DC(27), .DV(4), .IMAX(8), .NFRAMES(2)) u_full (
    .clk(clk), .checks(c_l), .failures(f_l), .fin(fin_l));

  initial begin
    repeat (2 * (8 * 124 + 100) + 200) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c_s + c_l, f_s + f_l + 1);
    $finish;
  end

  initial begin
    wait (fin_s && fin_l);
    $display("TB_RESULT checks=%0d failures=%0d", c_s + c_l, f_s + f_l);
    $finish;
  end
endmodule
