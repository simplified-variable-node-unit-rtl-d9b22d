// cnmem: check node message memory. One word per parity-check row (layer)
// holding the compressed check node output {z*, E(a), B*} of the last
// iteration, so that the C2V messages R_mn^(k-1) can be rebuilt when the row
// is processed again. Read is asynchronous at raddr, write on the rising
// edge at waddr. Each row has a valid bit, cleared by clr at the start of a
// frame: a row that has not been written yet reads as all zeros, which the
// decompression network turns into all-zero C2V messages (R^0 = 0). The
// valid bits and the packing are this design's choices.
module cnmem
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned DC   = DC_DEF,
  parameter int unsigned DV   = DV_DEF,
  localparam int unsigned Q   = 1 << P,
  localparam int unsigned CW  = $clog2(DC + 1),
  localparam int unsigned M   = DV * (Q - 1),
  localparam int unsigned LW  = $clog2(M),
  localparam int unsigned WW  = DC*P + Q*W + P*W + P*CW + P*P
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 we,
  input  logic [LW-1:0]        waddr,
  input  logic [DC-1:0][P-1:0] w_zs,
  input  logic [Q-1:0][W-1:0]  w_e,
  input  logic [P-1:0][W-1:0]  w_m1,
  input  logic [P-1:0][CW-1:0] w_col,
  input  logic [P-1:0][P-1:0]  w_sym,
  input  logic [LW-1:0]        raddr,
  output logic [DC-1:0][P-1:0] r_zs,
  output logic [Q-1:0][W-1:0]  r_e,
  output logic [P-1:0][W-1:0]  r_m1,
  output logic [P-1:0][CW-1:0] r_col,
  output logic [P-1:0][P-1:0]  r_sym
);
  logic [WW-1:0] mem [M];
  logic [M-1:0]  valid;
  logic [WW-1:0] rword;

  always_ff @(posedge clk)
    if (we) mem[waddr] <= {w_zs, w_e, w_m1, w_col, w_sym};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   valid <= '0;
    else if (clr) valid <= '0;
    else if (we)  valid[waddr] <= 1'b1;

  assign rword = valid[raddr] ? mem[raddr] : '0;

  // a frame clear never coincides with a row write, and rows stay in range
  a_clr_we: assert property (@(posedge clk) disable iff (!rst_n) !(clr && we));
  a_waddr:  assert property (@(posedge clk) disable iff (!rst_n) we |-> waddr < LW'(M));
  assign {r_zs, r_e, r_m1, r_col, r_sym} = rword;
endmodule
