// cnp_psi: the Psi function of the basic-set trellis min-max check node.
// For every row a of the delta-domain trellis (one row per field element)
// it scans the DC columns and returns the smallest LLR m1(a), the column
// icol(a) holding it (lowest column on ties) and the second smallest LLR
// m2(a). Row 0 is scanned like the others but is not used downstream.
// Combinational: a compare-select chain over the DC columns per row.
module cnp_psi
  import nb_pkg::*;
#(
  parameter int unsigned Q    = 1 << P_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned DC   = DC_DEF,
  localparam int unsigned CW  = $clog2(DC + 1)
) (
  input  logic [DC-1:0][Q-1:0][W-1:0] dq,    // dq[column][row]
  output logic [Q-1:0][W-1:0]         m1,
  output logic [Q-1:0][CW-1:0]        icol,
  output logic [Q-1:0][W-1:0]         m2
);
  always_comb
    for (int unsigned a = 0; a < Q; a++) begin
      m1[a]   = dq[0][a];
      icol[a] = '0;
      m2[a]   = {W{1'b1}};
      for (int unsigned j = 1; j < DC; j++) begin
        if (dq[j][a] < m1[a]) begin
          m2[a]   = m1[a];
          m1[a]   = dq[j][a];
          icol[a] = CW'(j);
        end else if (dq[j][a] < m2[a]) begin
          m2[a] = dq[j][a];
        end
      end
    end
endmodule
