// cnp_phi: the Phi function of the basic-set trellis min-max check node.
// Picks the basic set B*: P linearly independent nonzero field elements
// with the smallest m1 values, with their m1 and column index. Selection is
// greedy, which is optimal for independence: in round i the smallest m1
// among the elements outside the span of the elements already chosen is
// taken (lowest element on ties), and the span (a q-bit membership mask) is
// doubled by XOR-ing it with the new element. The set comes out sorted by
// m1, so entry P-1 holds the largest LLR of the set (m1_p*). The document
// states what Phi returns; the greedy span-mask circuit is this design's.
// Combinational.
module cnp_phi
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned DC   = DC_DEF,
  localparam int unsigned Q   = 1 << P,
  localparam int unsigned CW  = $clog2(DC + 1)
) (
  input  logic [Q-1:0][W-1:0]  m1,
  input  logic [Q-1:0][CW-1:0] icol,
  output logic [P-1:0][W-1:0]  bs_m1,    // m1_l*
  output logic [P-1:0][CW-1:0] bs_col,   // I_l*
  output logic [P-1:0][P-1:0]  bs_sym    // a_l*
);
  always_comb begin
    logic [Q-1:0] span;
    logic [Q-1:0] nspan;
    logic [P-1:0] best;
    logic [W-1:0] bestv;
    logic         found;
    span    = '0;
    span[0] = 1'b1;
    for (int unsigned i = 0; i < P; i++) begin
      best  = '0;
      bestv = '0;
      found = 1'b0;
      for (int unsigned a = 1; a < Q; a++)
        if (!span[a] && (!found || m1[a] < bestv)) begin
          best  = P'(a);
          bestv = m1[a];
          found = 1'b1;
        end
      bs_sym[i] = best;
      bs_m1[i]  = bestv;
      bs_col[i] = icol[best];
      nspan = span;
      for (int unsigned x = 0; x < Q; x++)
        if (span[x]) nspan[P'(x) ^ best] = 1'b1;
      span = nspan;
    end
  end
endmodule
