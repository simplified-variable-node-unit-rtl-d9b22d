// dn_path: path-information generator, first part of the decompression
// network. The P basic-set elements a_l* form a basis of GF(2^p), so every
// nonzero element a is the XOR of exactly one subset S(a) of them. The path
// d(a) of that element deviates from the most reliable path in the columns
// I_l* of the subset: d(a)[l] = I_l* if l is in S(a), otherwise the value
// NONE = 2^CW-1, which never equals a real column index (CW is wide enough
// for DC+1 values). The circuit enumerates all 2^P-1 subsets, XORs their
// elements, and scatters the column indices to the element they produce.
// d(0) is all NONE. Combinational.
module dn_path
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned DC   = DC_DEF,
  localparam int unsigned Q   = 1 << P,
  localparam int unsigned CW  = $clog2(DC + 1)
) (
  input  logic [P-1:0][P-1:0]         bs_sym,
  input  logic [P-1:0][CW-1:0]        bs_col,
  output logic [Q-1:0][P-1:0][CW-1:0] d
);
  always_comb begin
    d = '1;
    for (int unsigned s = 1; s < Q; s++) begin
      logic [P-1:0] el;
      el = '0;
      for (int unsigned l = 0; l < P; l++)
        if (s[l]) el = el ^ bs_sym[l];
      if (el != '0)
        for (int unsigned l = 0; l < P; l++)
          d[el][l] = s[l] ? bs_col[l] : {CW{1'b1}};
    end
  end
endmodule
