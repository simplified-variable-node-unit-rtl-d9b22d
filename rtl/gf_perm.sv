// gf_perm: permutation P and de-permutation P^-1 of one LLR vector by a
// nonzero parity-check coefficient h = alpha^hexp.
//
//   INVERSE = 0 (P)    : dout[a] = din[h * a]
//   INVERSE = 1 (P^-1) : dout[a] = din[h^-1 * a]
//
// Multiplying the index by alpha^e is a cyclic rotation of the q-1 nonzero
// entries when they are listed in power order alpha^0 .. alpha^(q-2). The
// module therefore rewires the vector into power order (constant wiring),
// rotates it by hexp with a barrel multiplexer, and rewires it back. Entry 0
// (the zero symbol) is never moved. Purely combinational. The document gives
// the function of P and P^-1; the rotation structure is this design's choice.
module gf_perm
  import nb_pkg::*;
#(
  parameter int unsigned P       = P_DEF,
  parameter int unsigned W       = W_DEF,
  parameter bit          INVERSE = 1'b0
) (
  input  logic [(1<<P)-1:0][W-1:0] din,
  input  logic [P-1:0]             hexp,   // exponent of h, 0 .. q-2
  output logic [(1<<P)-1:0][W-1:0] dout
);
  localparam int unsigned Q  = 1 << P;
  localparam int unsigned Q1 = Q - 1;

  logic [Q1-1:0][W-1:0] pw;    // din in power order
  logic [Q1-1:0][W-1:0] rot;   // rotated, power order

  for (genvar k = 0; k < Q1; k++) begin : g_pow
    localparam int unsigned EK = gf_exp(k, P);
    assign pw[k] = din[EK];
  end

  always_comb begin
    for (int unsigned k = 0; k < Q1; k++) begin
      int unsigned idx;
      if (INVERSE) idx = k + Q1 - 32'(hexp);
      else         idx = k + 32'(hexp);
      if (idx >= Q1) idx = idx - Q1;
      if (idx >= Q1) idx = idx - Q1;
      rot[k] = pw[idx];
    end
  end

  assign dout[0] = din[0];
  for (genvar a = 1; a < Q; a++) begin : g_out
    localparam int unsigned LA = gf_log(a, P);
    assign dout[a] = rot[LA];
  end
endmodule
