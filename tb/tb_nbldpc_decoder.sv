// tb_nbldpc_decoder: end-to-end test of the decoder at its default size
// ((837,726) code over GF(32), 8 iterations). It sends the all-zero
// codeword (a codeword of every linear code) over a BPSK/AWGN channel, turns
// the received bits into symbol LLR vectors L_n(a) = sum of |bit LLR| over
// the bits where a differs from the hard decision, quantized to 5 bits,
// loads them with gaps in in_valid, decodes, and reads back the symbols.
// Checks: every frame decodes to the all-zero word, decoding takes exactly
// 8*124 cycles after the last load beat, and the handshake signals. It also
// counts, and requires at least once: load stalls, layers that start from
// empty check node memory, channel symbol errors, C2V messages taken from
// the complement set, saturating updates, and rows written on reread.
module tb_nbldpc_decoder;
  localparam int P = 5, W = 5, DC = 27, Q = 1 << P, Z = Q - 1, AW = $clog2(Z);
  localparam int IMAX = 8, M = 4 * Z;
  localparam int NFRAMES = 3;
  localparam real SIGMA = 0.42;     // about 5.2 dB Eb/N0 at rate 0.867
  localparam real SCALE = 0.55;     // LLR quantization step

  int checks = 0, failures = 0;
  int n_stall = 0, n_empty = 0, n_chan_err = 0, n_comp = 0, n_sat = 0, n_reuse = 0;
  logic clk = 0, rst_n, start, in_valid, in_ready, busy, done;
  logic [DC-1:0][Q-1:0][W-1:0] in_llr;
  logic [AW-1:0]               out_addr;
  logic [DC-1:0][P-1:0]        out_sym;
  int llr [DC*Z][Q];

  nbldpc_decoder dut (
    .clk(clk), .rst_n(rst_n), .start(start), .in_valid(in_valid), .in_ready(in_ready),
    .in_llr(in_llr), .busy(busy), .done(done), .out_addr(out_addr), .out_sym(out_sym));
  always #5 clk = ~clk;

  // mechanism counters, sampled while decoding
  always @(posedge clk)
    if (dut.dec_we) begin
      if (!dut.u_vnp.u_cnmem.valid[dut.layer]) n_empty++;
      else n_reuse++;
      for (int a = 1; a < Q; a++)
        for (int l = 0; l < P; l++)
          if (dut.u_vnp.u_dn_new.d[a][l] == '0) n_comp++;
      for (int a = 0; a < Q; a++)
        if (int'(dut.u_vnp.qmn[0][a]) + int'(dut.u_vnp.r_new[0][a]) > 31) n_sat++;
    end

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

  task automatic make_frame();
    for (int n = 0; n < DC * Z; n++) begin
      int mag[8], hd = 0;
      for (int b = 0; b < P; b++) begin
        real y = 1.0 + SIGMA * gauss();
        real lam = 2.0 * y / (SIGMA * SIGMA) * SCALE;
        if (lam < 0.0) begin hd |= 1 << b; lam = -lam; end
        mag[b] = int'(lam);
      end
      if (hd != 0) n_chan_err++;
      for (int a = 0; a < Q; a++) begin
        int s = 0;
        for (int b = 0; b < P; b++) if (((a ^ hd) >> b) & 1) s += mag[b];
        llr[n][a] = (s > 31) ? 31 : s;
      end
    end
  endtask

  initial begin
    repeat (NFRAMES * 1200 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; in_valid = 0; out_addr = '0; in_llr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      automatic int beats = 0, cyc = 0, errs = 0;
      make_frame();
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (beats < Z) begin
        in_valid = (($urandom_range(4) != 0) || beats == 0) ? 1'b1 : 1'b0;
        for (int j = 0; j < DC; j++)
          for (int a = 0; a < Q; a++) in_llr[j][a] = W'(llr[j * Z + beats][a]);
        #1;
        checks++;
        if (!in_ready || !busy) failures++;
        if (in_valid) beats++;
        else n_stall++;
        @(negedge clk);
      end
      in_valid = 0;
      while (!done) begin
        cyc++;
        @(negedge clk);
      end
      checks++;
      if (cyc != IMAX * M) failures++;
      for (int t = 0; t < Z; t++) begin
        out_addr = AW'(t);
        #1;
        for (int j = 0; j < DC; j++) if (out_sym[j] != '0) errs++;
      end
      checks++;
      if (errs != 0) failures++;
      $display("frame %0d: %0d decoding cycles, %0d symbol errors left", f, cyc, errs);
    end
    $display("mechanisms: load stalls %0d, empty-row layers %0d, reused-row layers %0d, channel symbol errors %0d, complement C2V %0d, saturations %0d",
             n_stall, n_empty, n_reuse, n_chan_err, n_comp, n_sat);
    checks += 6;
    if (n_stall == 0) failures++;
    if (n_empty == 0) failures++;
    if (n_reuse == 0) failures++;
    if (n_chan_err == 0) failures++;
    if (n_comp == 0) failures++;
    if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
