// delta2normal: last part of the decompression network. Moves a C2V vector
// from the delta domain back to the normal domain of its variable node:
//   r[a] = dr[a ^ zs]
// where zs = z_n* is the symbol the check favours for that node. The delta
// entry 0 (LLR 0) lands on symbol zs. Combinational XOR-indexed crossbar.
module delta2normal
  import nb_pkg::*;
#(
  parameter int unsigned P = P_DEF,
  parameter int unsigned W = W_DEF
) (
  input  logic [(1<<P)-1:0][W-1:0] dr,
  input  logic [P-1:0]             zs,
  output logic [(1<<P)-1:0][W-1:0] r
);
  always_comb
    for (int unsigned a = 0; a < (1 << P); a++)
      r[a] = dr[P'(a) ^ zs];
endmodule
