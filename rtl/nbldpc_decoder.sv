// nbldpc_decoder: layered nonbinary LDPC decoder using the simplified
// basic-set trellis min-max algorithm, by default for the (837,726) code
// over GF(32) with column weight 4 and row weight 27 (a 4 x 27 array of
// 31 x 31 circulants). It joins the controller, the variable node processor
// and the check node processor; one parity-check row is processed per clock
// cycle.
//
// Interface and timing:
//   start              pulse in idle/done: begins a frame
//   in_valid/in_ready  31 beats of in_llr, beat t = LLR vectors of the
//                      variable nodes t, 31+t, ..., 26*31+t (one per block
//                      column j, node j*31+t); entry a of a vector is the
//                      LLR of symbol a (vector form), 0 for the most
//                      likely symbol, larger = less likely
//   busy               high during loading and decoding
//   done               high after IMAX*124 decoding cycles
//   out_addr/out_sym   asynchronous read of the hard decisions of nodes
//                      j*31+out_addr, j = 0..26
module nbldpc_decoder
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned DC   = DC_DEF,
  parameter int unsigned DV   = DV_DEF,
  parameter int unsigned IMAX = IMAX_DEF,
  localparam int unsigned Q   = 1 << P,
  localparam int unsigned Z   = Q - 1,
  localparam int unsigned AW  = $clog2(Z)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [DC-1:0][Q-1:0][W-1:0] in_llr,
  output logic                        busy,
  output logic                        done,
  input  logic [AW-1:0]               out_addr,
  output logic [DC-1:0][P-1:0]        out_sym
);
  localparam int unsigned CW = $clog2(DC + 1);
  localparam int unsigned M  = DV * Z;
  localparam int unsigned LW = $clog2(M);
  localparam int unsigned IW = (IMAX > 1) ? $clog2(IMAX) : 1;

  logic                        load_we, cn_clr, dec_we;
  logic [AW-1:0]               load_addr;
  logic [LW-1:0]               layer;
  logic [DC-1:0][AW-1:0]       addr;
  logic [DC-1:0][P-1:0]        hexp;
  logic [IW-1:0]               iter;

  logic [DC-1:0][Q-1:0][W-1:0] qmn;
  logic [DC-1:0][P-1:0]        z, zs;
  logic [Q-1:0][W-1:0]         e;
  logic [P-1:0][W-1:0]         bs_m1;
  logic [P-1:0][CW-1:0]        bs_col;
  logic [P-1:0][P-1:0]         bs_sym;

  dec_ctrl #(.P(P), .DC(DC), .DV(DV), .IMAX(IMAX)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .in_valid(in_valid),
    .in_ready(in_ready), .load_we(load_we), .load_addr(load_addr),
    .cn_clr(cn_clr), .dec_we(dec_we), .layer(layer), .addr(addr),
    .hexp(hexp), .iter(iter), .busy(busy), .done(done));

  vnp #(.P(P), .W(W), .DC(DC), .DV(DV)) u_vnp (
    .clk(clk), .rst_n(rst_n), .load_we(load_we), .load_addr(load_addr),
    .llr_in(in_llr), .cn_clr(cn_clr), .dec_we(dec_we), .layer(layer),
    .addr(addr), .hexp(hexp), .qmn(qmn), .z(z), .cn_zs(zs), .cn_e(e),
    .cn_m1(bs_m1), .cn_col(bs_col), .cn_sym(bs_sym),
    .out_addr(out_addr), .out_sym(out_sym));

  // decoding stops after IMAX iterations; loading only while ready
  a_iter: assert property (@(posedge clk) disable iff (!rst_n) dec_we |-> int'(iter) < int'(IMAX));
  a_load: assert property (@(posedge clk) disable iff (!rst_n) load_we |-> in_ready);

  cnp #(.P(P), .W(W), .DC(DC)) u_cnp (
    .qmn(qmn), .z(z), .zs(zs), .e(e), .bs_m1(bs_m1), .bs_col(bs_col),
    .bs_sym(bs_sym));
endmodule
