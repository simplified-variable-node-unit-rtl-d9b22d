// app_add: a-posteriori update adder. Adds the new check-to-variable
// message to the normalized variable-to-check message:
//   qa[a] = min(qn[a] + r_new[a], 2^W-1)
// (Q_n = Q_mn + R_mn, saturated to the W-bit LLR range; the saturation is
// this design's choice). Combinational; one vector of q entries.
module app_add
  import nb_pkg::*;
#(
  parameter int unsigned Q = 1 << P_DEF,
  parameter int unsigned W = W_DEF
) (
  input  logic [Q-1:0][W-1:0] qn,
  input  logic [Q-1:0][W-1:0] r_new,
  output logic [Q-1:0][W-1:0] qa
);
  always_comb
    for (int unsigned a = 0; a < Q; a++) begin
      logic [W:0] s;
      s = {1'b0, qn[a]} + {1'b0, r_new[a]};
      qa[a] = s[W] ? {W{1'b1}} : s[W-1:0];
    end
endmodule
