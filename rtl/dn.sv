// dn: decompression network. Expands the compressed check node output
// {z*, E(a), B*} of one parity-check row into the DC normal-domain C2V
// vectors R_mn(a): one path generator (dn_path) shared by the row, then per
// column n a C2V generator (c2v_gen, column index n) and a delta-to-normal
// crossbar (delta2normal, offset z_n*). The variable node processor holds
// two of these: one for the stored messages of the previous iteration and
// one for the fresh check node output. Combinational.
module dn
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned DC   = DC_DEF,
  localparam int unsigned Q   = 1 << P,
  localparam int unsigned CW  = $clog2(DC + 1)
) (
  input  logic [DC-1:0][P-1:0]        zs,
  input  logic [Q-1:0][W-1:0]         e,
  input  logic [P-1:0][W-1:0]         bs_m1,
  input  logic [P-1:0][CW-1:0]        bs_col,
  input  logic [P-1:0][P-1:0]         bs_sym,
  output logic [DC-1:0][Q-1:0][W-1:0] r
);
  logic [Q-1:0][P-1:0][CW-1:0] d;

  dn_path #(.P(P), .DC(DC)) u_path (.bs_sym(bs_sym), .bs_col(bs_col), .d(d));

  for (genvar n = 0; n < DC; n++) begin : g_col
    logic [Q-1:0][W-1:0] dr;
    c2v_gen #(.P(P), .W(W), .DC(DC)) u_c2v (
      .n(CW'(n)), .bs_sym(bs_sym), .bs_m1(bs_m1), .d(d), .e(e), .dr(dr));
    delta2normal #(.P(P), .W(W)) u_d2n (.dr(dr), .zs(zs[n]), .r(r[n]));
  end
endmodule
