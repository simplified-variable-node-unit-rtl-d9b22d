// cnp: basic-set trellis min-max (BS-TMM) check node processor for one
// parity-check row with DC neighbours, fully parallel and combinational.
//   1. delta domain: dq[j][eta] = qmn[j][eta ^ z[j]], so the most reliable
//      symbol of every input sits at index 0;
//   2. syndrome beta = XOR of all hard decisions z[j];
//   3. Psi: per trellis row, m1, its column and m2 (cnp_psi);
//   4. Phi: basic set B* of P independent elements (cnp_phi);
//   5. complement set E(a): m2(a) for the P basic-set elements, m1(a) for
//      every other nonzero element; E(0) = 0;
//   6. zs[j] = z[j] ^ beta.
// Output size is 3P + (q-1) + DC values, as in the document. For step 5 the
// document's algorithm box and its prose disagree; this block follows the
// prose (m2 for basic-set elements), which is the one consistent with the
// variable node's use of E(a).
module cnp
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned DC   = DC_DEF,
  localparam int unsigned Q   = 1 << P,
  localparam int unsigned CW  = $clog2(DC + 1)
) (
  input  logic [DC-1:0][Q-1:0][W-1:0] qmn,     // normalized V2C vectors
  input  logic [DC-1:0][P-1:0]        z,       // their hard decisions
  output logic [DC-1:0][P-1:0]        zs,      // z_n* = z_n ^ beta
  output logic [Q-1:0][W-1:0]         e,       // complement set E(a)
  output logic [P-1:0][W-1:0]         bs_m1,
  output logic [P-1:0][CW-1:0]        bs_col,
  output logic [P-1:0][P-1:0]         bs_sym
);
  logic [DC-1:0][Q-1:0][W-1:0] dq;
  logic [Q-1:0][W-1:0]         m1, m2;
  logic [Q-1:0][CW-1:0]        icol;
  logic [P-1:0]                beta;

  always_comb begin
    beta = '0;
    for (int unsigned j = 0; j < DC; j++) begin
      beta = beta ^ z[j];
      for (int unsigned t = 0; t < Q; t++)
        dq[j][t] = qmn[j][P'(t) ^ z[j]];
    end
    for (int unsigned j = 0; j < DC; j++)
      zs[j] = z[j] ^ beta;
  end

  cnp_psi #(.Q(Q), .W(W), .DC(DC)) u_psi (.dq(dq), .m1(m1), .icol(icol), .m2(m2));
  cnp_phi #(.P(P), .W(W), .DC(DC)) u_phi (.m1(m1), .icol(icol),
                                          .bs_m1(bs_m1), .bs_col(bs_col), .bs_sym(bs_sym));

  always_comb begin
    e[0] = '0;
    for (int unsigned a = 1; a < Q; a++) begin
      logic in_bs;
      in_bs = 1'b0;
      for (int unsigned i = 0; i < P; i++)
        if (bs_sym[i] == P'(a)) in_bs = 1'b1;
      e[a] = in_bs ? m2[a] : m1[a];
    end
  end
endmodule
