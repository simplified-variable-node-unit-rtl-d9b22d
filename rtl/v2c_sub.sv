// v2c_sub: variable-to-check subtractor. Removes the check node's previous
// contribution from the permuted a-posteriori vector:
//   qt[a] = qp[a] - r_old[a]        (Q~_mn(a) = Q_n(h a) - R_mn^(k-1)(a))
// Both inputs are unsigned W-bit LLRs; the result is a signed (W+1)-bit
// value that the normalizer brings back to W bits. An entry of qp at the
// saturation value 2^W-1 only says "at least 2^W-1", so it is passed on
// unchanged instead of having r_old taken off: subtracting from a clipped
// value would make unlikely symbols look likely, and with 5-bit LLRs the
// decoder then collapses after a few iterations. This rule is this design's
// own; the document gives only the subtraction. Combinational; one vector.
module v2c_sub
  import nb_pkg::*;
#(
  parameter int unsigned Q = 1 << P_DEF,
  parameter int unsigned W = W_DEF
) (
  input  logic        [Q-1:0][W-1:0] qp,
  input  logic        [Q-1:0][W-1:0] r_old,
  output logic signed [Q-1:0][W:0]   qt
);
  always_comb
    for (int unsigned a = 0; a < Q; a++)
      if (qp[a] == {W{1'b1}}) qt[a] = signed'({1'b0, qp[a]});
      else                    qt[a] = signed'({1'b0, qp[a]}) - signed'({1'b0, r_old[a]});
endmodule
