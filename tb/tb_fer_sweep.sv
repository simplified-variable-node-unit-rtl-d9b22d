// tb_fer_sweep: frame-error-rate sweep of the decoder at 15 iterations over
// a BPSK/AWGN channel at Eb/N0 = 3.8, 4.2 and 4.6 dB (the range and
// iteration count of the published FER curve), with the all-zero codeword
// and NF frames per point. Checks that every frame takes 15*124 decoding
// cycles, that the frame error count does not rise with Eb/N0, and that at
// 4.6 dB at most a quarter of the frames fail.
// Prints the frame error rate per point; with few frames these are rough
// estimates only.
module tb_fer_sweep;
  localparam int P = 5, W = 5, DC = 27, Q = 1 << P, Z = Q - 1, AW = $clog2(Z);
  localparam int IMAX = 15, M = 4 * Z, NF = 20;
  localparam real RATE = 726.0 / 837.0;
  localparam real SCALE = 0.55;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n, start, in_valid, in_ready, busy, done;
  logic [DC-1:0][Q-1:0][W-1:0] in_llr;
  logic [AW-1:0]               out_addr;
  logic [DC-1:0][P-1:0]        out_sym;
  int llr [DC*Z][Q];
  real ebn0 [3] = '{3.8, 4.2, 4.6};
  int fe [3];

  nbldpc_decoder #(.IMAX(IMAX)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .in_valid(in_valid), .in_ready(in_ready),
    .in_llr(in_llr), .busy(busy), .done(done), .out_addr(out_addr), .out_sym(out_sym));
  always #5 clk = ~clk;

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

  task automatic make_frame(real sigma, output int chan_err);
    chan_err = 0;
    for (int n = 0; n < DC * Z; n++) begin
      int mag[8], hd = 0;
      for (int b = 0; b < P; b++) begin
        real y = 1.0 + sigma * gauss();
        real lam = 2.0 * y / (sigma * sigma) * SCALE;
        if (lam < 0.0) begin hd |= 1 << b; lam = -lam; end
        mag[b] = int'(lam);
      end
      if (hd != 0) chan_err++;
      for (int a = 0; a < Q; a++) begin
        int s = 0;
        for (int b = 0; b < P; b++) if (((a ^ hd) >> b) & 1) s += mag[b];
        llr[n][a] = (s > 31) ? 31 : s;
      end
    end
  endtask

  task automatic run_frame(output int cyc, output int errs);
    int beats = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (beats < Z) begin
      in_valid = 1;
      for (int j = 0; j < DC; j++)
        for (int a = 0; a < Q; a++) in_llr[j][a] = W'(llr[j * Z + beats][a]);
      beats++;
      @(negedge clk);
    end
    in_valid = 0;
    cyc = 0;
    while (!done) begin
      cyc++;
      @(negedge clk);
    end
    errs = 0;
    for (int t = 0; t < Z; t++) begin
      out_addr = AW'(t);
      #1;
      for (int j = 0; j < DC; j++) if (out_sym[j] != '0) errs++;
    end
  endtask

  initial begin
    repeat (3 * NF * (IMAX * M + 40) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; in_valid = 0; out_addr = '0; in_llr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      automatic real sigma = $sqrt(1.0 / (2.0 * RATE * (10.0 ** (ebn0[s] / 10.0))));
      automatic int ch_tot = 0, res_tot = 0;
      fe[s] = 0;
      for (int f = 0; f < NF; f++) begin
        int ce, cyc, errs;
        make_frame(sigma, ce);
        run_frame(cyc, errs);
        checks++;
        if (cyc != IMAX * M) failures++;
        if (errs != 0) fe[s]++;
        ch_tot += ce;
        res_tot += errs;
      end
      $display("Eb/N0 %.1f dB: %0d/%0d frames in error (FER %.3f), channel symbol errors %0d, residual %0d",
               ebn0[s], fe[s], NF, real'(fe[s]) / NF, ch_tot, res_tot);
    end
    checks += 3;
    if (fe[1] > fe[0]) failures++;
    if (fe[2] > fe[1]) failures++;
    if (fe[2] * 4 > NF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
