// outmem: output memory. DC banks of depth q-1 holding the current hard
// decision (P-bit symbol) of every variable node, written together with the
// variable node memory. One shared read address lets a host fetch the
// decoded word one row of DC symbols at a time. Asynchronous read, write on
// the rising edge. The document only names this memory; its organisation
// mirrors the variable node memory.
module outmem
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned DC   = DC_DEF,
  localparam int unsigned Z   = (1 << P) - 1,
  localparam int unsigned AW  = $clog2(Z)
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [DC-1:0][AW-1:0] waddr,
  input  logic [DC-1:0][P-1:0]  wdata,
  input  logic [AW-1:0]         raddr,
  output logic [DC-1:0][P-1:0]  rdata
);
  for (genvar j = 0; j < DC; j++) begin : g_bank
    logic [P-1:0] mem [Z];
    always_ff @(posedge clk)
      if (we) mem[waddr[j]] <= wdata[j];
    assign rdata[j] = mem[raddr];
  end
endmodule
