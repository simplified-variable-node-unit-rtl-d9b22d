// tb_cnmem: after a clear every row must read as zeros; written rows read
// back field by field; a second clear hides them again.
module tb_cnmem;
  localparam int P = 5, W = 5, DC = 27, DV = 4, Q = 1 << P, CW = $clog2(DC + 1);
  localparam int M = DV * (Q - 1), LW = $clog2(M);
  localparam int WW = DC*P + Q*W + P*W + P*CW + P*P;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n, clr, we;
  logic [LW-1:0] waddr, raddr;
  logic [DC-1:0][P-1:0] w_zs, r_zs;
  logic [Q-1:0][W-1:0]  w_e, r_e;
  logic [P-1:0][W-1:0]  w_m1, r_m1;
  logic [P-1:0][CW-1:0] w_col, r_col;
  logic [P-1:0][P-1:0]  w_sym, r_sym;
  logic [WW-1:0] shadow [M];
  logic [M-1:0]  wr;

  cnmem #(.P(P), .W(W), .DC(DC), .DV(DV)) dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .we(we), .waddr(waddr),
    .w_zs(w_zs), .w_e(w_e), .w_m1(w_m1), .w_col(w_col), .w_sym(w_sym),
    .raddr(raddr), .r_zs(r_zs), .r_e(r_e), .r_m1(r_m1), .r_col(r_col), .r_sym(r_sym));
  always #5 clk = ~clk;

  task automatic check_all();
    for (int a = 0; a < M; a++) begin
      raddr = LW'(a);
      #1;
      checks++;
      if ({r_zs, r_e, r_m1, r_col, r_sym} !== (wr[a] ? shadow[a] : '0)) failures++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clr = 0; we = 0; wr = '0; raddr = '0; waddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      @(negedge clk);
      clr = 1; wr = '0;
      @(negedge clk);
      clr = 0;
      check_all();
      for (int t = 0; t < 150; t++) begin
        @(negedge clk);
        we = 1;
        waddr = LW'($urandom_range(M - 1));
        {w_zs, w_e, w_m1, w_col, w_sym} = {$urandom, $urandom, $urandom, $urandom,
          $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        @(posedge clk);
        shadow[waddr] = {w_zs, w_e, w_m1, w_col, w_sym};
        wr[waddr] = 1'b1;
      end
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
