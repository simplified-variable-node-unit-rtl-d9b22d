// c2v_gen: C2V generator of the simplified basic-set trellis min-max
// variable node (the circuit drawn for GF(8) in the document, here for any
// GF(2^p)). For one column n of the check and every nonzero element a:
//   - extra-column value dQ(a): m1_l* when a equals basic-set element a_l*,
//     and m1_p* (the largest LLR of the basic set) for every other element;
//     this replaces the maximum over the combined elements of the full
//     algorithm and is the simplification of the design;
//   - if the path d(a) deviates in column n (some d(a)[l] == n) the
//     message is the complement E(a), otherwise dQ(a).
// dr[0] = 0. The output is in the delta domain. Combinational.
module c2v_gen
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned DC   = DC_DEF,
  localparam int unsigned Q   = 1 << P,
  localparam int unsigned CW  = $clog2(DC + 1)
) (
  input  logic [CW-1:0]               n,        // column of this message
  input  logic [P-1:0][P-1:0]         bs_sym,
  input  logic [P-1:0][W-1:0]         bs_m1,
  input  logic [Q-1:0][P-1:0][CW-1:0] d,
  input  logic [Q-1:0][W-1:0]         e,
  output logic [Q-1:0][W-1:0]         dr
);
  always_comb begin
    dr[0] = '0;
    for (int unsigned a = 1; a < Q; a++) begin
      logic [W-1:0] dqa;
      logic         is_bs;
      logic         hit;
      dqa   = '0;
      is_bs = 1'b0;
      hit   = 1'b0;
      for (int unsigned l = 0; l < P; l++) begin
        if (bs_sym[l] == P'(a)) begin
          dqa   = dqa | bs_m1[l];
          is_bs = 1'b1;
        end
        if (d[a][l] == n) hit = 1'b1;
      end
      if (!is_bs) dqa = bs_m1[P-1];
      dr[a] = hit ? e[a] : dqa;
    end
  end
endmodule
