// hard_dec: hard decision of one LLR vector: the index of the smallest
// unsigned entry, lowest index on ties. Combinational.
module hard_dec
  import nb_pkg::*;
#(
  parameter int unsigned P = P_DEF,
  parameter int unsigned W = W_DEF
) (
  input  logic [(1<<P)-1:0][W-1:0] q,
  output logic [P-1:0]             sym
);
  always_comb begin
    logic [W-1:0] mn;
    mn  = q[0];
    sym = '0;
    for (int unsigned a = 1; a < (1 << P); a++)
      if (q[a] < mn) begin
        mn  = q[a];
        sym = P'(a);
      end
  end
endmodule
