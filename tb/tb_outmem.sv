// tb_outmem: random symbol writes per bank, read back through the shared
// read address and compared with a shadow copy.
module tb_outmem;
  localparam int P = 5, DC = 27, Z = (1 << P) - 1, AW = $clog2(Z);
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [DC-1:0][AW-1:0] waddr;
  logic [DC-1:0][P-1:0]  wdata, rdata;
  logic [AW-1:0]         raddr;
  logic [P-1:0] shadow [DC][Z];

  outmem #(.P(P), .DC(DC)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                .raddr(raddr), .rdata(rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0;
    for (int a = 0; a < Z; a++) begin
      @(negedge clk);
      we = 1;
      for (int j = 0; j < DC; j++) begin
        waddr[j] = AW'((a + j) % Z);
        wdata[j] = P'($urandom);
        shadow[j][(a + j) % Z] = wdata[j];
      end
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = ($urandom_range(1) == 1);
      raddr = AW'($urandom_range(Z - 1));
      for (int j = 0; j < DC; j++) begin
        waddr[j] = AW'($urandom_range(Z - 1));
        wdata[j] = P'($urandom);
      end
      @(posedge clk);
      if (we) for (int j = 0; j < DC; j++) shadow[j][waddr[j]] = wdata[j];
      #1;
      for (int j = 0; j < DC; j++) begin
        checks++;
        if (rdata[j] !== shadow[j][raddr]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
