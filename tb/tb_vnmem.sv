// tb_vnmem: random writes to independent bank addresses, compared with a
// shadow copy on every read; also checks that a read shows the old word in
// the cycle of a write and the new one after the edge.
module tb_vnmem;
  localparam int P = 5, W = 5, DC = 27, Q = 1 << P, Z = Q - 1, AW = $clog2(Z);
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [DC-1:0][AW-1:0]       waddr, raddr;
  logic [DC-1:0][Q-1:0][W-1:0] wdata, rdata;
  logic [Q*W-1:0] shadow [DC][Z];

  vnmem #(.P(P), .W(W), .DC(DC)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
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
    // fill every address
    for (int a = 0; a < Z; a++) begin
      @(negedge clk);
      we = 1;
      for (int j = 0; j < DC; j++) begin
        waddr[j] = AW'(a);
        for (int k = 0; k < Q; k++) wdata[j][k] = W'($urandom);
        shadow[j][a] = wdata[j];
      end
    end
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = t[0];
      for (int j = 0; j < DC; j++) begin
        waddr[j] = AW'($urandom_range(Z - 1));
        raddr[j] = (t % 4 == 1) ? waddr[j] : AW'($urandom_range(Z - 1));
        for (int k = 0; k < Q; k++) wdata[j][k] = W'($urandom);
      end
      #1;
      for (int j = 0; j < DC; j++) begin
        checks++;
        if (rdata[j] !== shadow[j][raddr[j]]) failures++;
      end
      @(posedge clk);
      if (we) for (int j = 0; j < DC; j++) shadow[j][waddr[j]] = wdata[j];
      #1;
      for (int j = 0; j < DC; j++) begin
        checks++;
        if (rdata[j] !== shadow[j][raddr[j]]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
