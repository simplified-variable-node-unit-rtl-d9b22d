// vnmem: variable node memory. DC banks, one per block column of the
// parity-check matrix; bank j holds the q-1 a-posteriori LLR vectors Q_n(a)
// of the variable nodes in block column j (depth q-1, width q*W bits).
// Every cycle each bank is read at one address and written at one address,
// as the document states. The read is asynchronous (combinational) so that a
// whole layer can be read, updated and written back in the same clock cycle;
// that timing is this design's choice. Writes happen on the rising edge.
module vnmem
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned DC   = DC_DEF,
  localparam int unsigned Q   = 1 << P,
  localparam int unsigned Z   = Q - 1,
  localparam int unsigned AW  = $clog2(Z)
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [DC-1:0][AW-1:0]       waddr,
  input  logic [DC-1:0][Q-1:0][W-1:0] wdata,
  input  logic [DC-1:0][AW-1:0]       raddr,
  output logic [DC-1:0][Q-1:0][W-1:0] rdata
);
  for (genvar j = 0; j < DC; j++) begin : g_bank
    logic [Q*W-1:0] mem [Z];
    always_ff @(posedge clk)
      if (we) mem[waddr[j]] <= wdata[j];
    assign rdata[j] = mem[raddr[j]];
  end
endmodule
