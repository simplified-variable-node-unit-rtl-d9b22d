// llr_norm: normalization N. Finds the smallest entry of a signed LLR
// vector and its index z (the hard decision, lowest index on ties), then
// subtracts that minimum from every entry so that the most reliable symbol
// has LLR 0. Results above 2^W-1 saturate to 2^W-1. Combinational.
// The document gives the two steps; the saturation and tie rule are this
// design's choices.
module llr_norm
  import nb_pkg::*;
#(
  parameter int unsigned P = P_DEF,
  parameter int unsigned W = W_DEF
) (
  input  logic signed [(1<<P)-1:0][W:0]   qt,
  output logic        [(1<<P)-1:0][W-1:0] qn,
  output logic        [P-1:0]             z
);
  localparam int unsigned Q = 1 << P;
  localparam int unsigned MAXV = (1 << W) - 1;

  logic signed [W:0] mn;

  always_comb begin
    mn = $signed(qt[0]);
    z  = '0;
    for (int unsigned a = 1; a < Q; a++)
      if ($signed(qt[a]) < mn) begin
        mn = $signed(qt[a]);
        z  = P'(a);
      end
    for (int unsigned a = 0; a < Q; a++) begin
      logic signed [W+1:0] d;
      d = (W+2)'($signed(qt[a])) - (W+2)'(mn);
      if (d > (W+2)'(MAXV)) qn[a] = W'(MAXV);
      else                  qn[a] = d[W-1:0];
    end
  end
endmodule
