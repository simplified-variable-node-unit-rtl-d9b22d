// tb_dec_ctrl: runs two frames through the controller with gaps in the
// load handshake. Checks the load addresses and the number of accepted
// beats, the clear pulse, that decoding takes exactly IMAX*DV*(q-1) cycles
// with one layer per cycle, the layer and iteration numbering, every
// address / coefficient exponent against (r + b*j) mod (q-1), and done.
module tb_dec_ctrl;
  localparam int P = 5, DC = 27, DV = 4, IMAX = 8, Z = (1 << P) - 1, AW = $clog2(Z);
  localparam int M = DV * Z, LW = $clog2(M), IW = $clog2(IMAX);
  int checks = 0, failures = 0, stalls = 0;
  logic clk = 0, rst_n, start, in_valid, in_ready, load_we, cn_clr, dec_we, busy, done;
  logic [AW-1:0] load_addr;
  logic [LW-1:0] layer;
  logic [DC-1:0][AW-1:0] addr;
  logic [DC-1:0][P-1:0]  hexp;
  logic [IW-1:0] iter;

  dec_ctrl #(.P(P), .DC(DC), .DV(DV), .IMAX(IMAX)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .in_valid(in_valid), .in_ready(in_ready),
    .load_we(load_we), .load_addr(load_addr), .cn_clr(cn_clr), .dec_we(dec_we),
    .layer(layer), .addr(addr), .hexp(hexp), .iter(iter), .busy(busy), .done(done));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; start = 0; in_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      int beats, cyc;
      @(negedge clk);
      checks++;
      if (busy || (frame == 1 && !done)) failures++;
      start = 1;
      #1;
      checks++;
      if (!cn_clr) failures++;
      @(negedge clk);
      start = 0;
      beats = 0;
      while (beats < Z) begin
        in_valid = ($urandom_range(3) != 0);
        #1;
        checks++;
        if (!in_ready) failures++;
        if (in_valid) begin
          checks++;
          if (!load_we || int'(load_addr) != beats) failures++;
          beats++;
        end else stalls++;
        @(negedge clk);
      end
      in_valid = 0;
      cyc = 0;
      while (dec_we) begin
        automatic int it = cyc / M, l = cyc % M, b = l / Z, r = l % Z;
        checks += 2;
        if (int'(layer) != l || int'(iter) != it) failures++;
        if (in_ready || !busy) failures++;
        for (int j = 0; j < DC; j++) begin
          checks++;
          if (int'(addr[j]) != (r + b * j) % Z || int'(hexp[j]) != int'(addr[j])) failures++;
        end
        cyc++;
        @(negedge clk);
      end
      checks += 2;
      if (cyc != IMAX * M) failures++;
      if (!done || busy) failures++;
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
