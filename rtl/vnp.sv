// vnp: variable node processor of the layered decoder. In one clock cycle
// it processes one layer (one parity-check row) for its DC variable nodes:
//   read Q_n from the variable node memory at addr[j]      (VNMEM)
//   permute by h = alpha^hexp[j]                            (P)
//   subtract the previous C2V message R^(k-1), rebuilt by DN from the
//   compressed word of this row in the check node memory   (CN MEM, DN)
//   normalize, giving Q_mn and its hard decision z_n       (N)
//   -> to the check node processor, which returns {z*, E, B*}
//   expand the fresh check output into R^k                  (second DN)
//   add, de-permute and write back to the same addresses   (+, P^-1)
//   store {z*, E, B*} for this row, and the hard decision of the updated
//   vector in the output memory                             (CN MEM, OUT MEM)
// During loading the memory write data is the channel LLR vector instead
// (input multiplexer), written at load_addr in all banks. All updates land
// on the rising edge at the end of the cycle. The dataflow follows the
// document's top-level diagram; single-cycle timing with asynchronous-read
// memories is this design's choice.
module vnp
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned W    = W_DEF,
  parameter int unsigned DC   = DC_DEF,
  parameter int unsigned DV   = DV_DEF,
  localparam int unsigned Q   = 1 << P,
  localparam int unsigned Z   = Q - 1,
  localparam int unsigned AW  = $clog2(Z),
  localparam int unsigned CW  = $clog2(DC + 1),
  localparam int unsigned M   = DV * Z,
  localparam int unsigned LW  = $clog2(M)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // loading
  input  logic                        load_we,
  input  logic [AW-1:0]               load_addr,
  input  logic [DC-1:0][Q-1:0][W-1:0] llr_in,
  // layer control
  input  logic                        cn_clr,
  input  logic                        dec_we,
  input  logic [LW-1:0]               layer,
  input  logic [DC-1:0][AW-1:0]       addr,
  input  logic [DC-1:0][P-1:0]        hexp,
  // to / from the check node processor
  output logic [DC-1:0][Q-1:0][W-1:0] qmn,
  output logic [DC-1:0][P-1:0]        z,
  input  logic [DC-1:0][P-1:0]        cn_zs,
  input  logic [Q-1:0][W-1:0]         cn_e,
  input  logic [P-1:0][W-1:0]         cn_m1,
  input  logic [P-1:0][CW-1:0]        cn_col,
  input  logic [P-1:0][P-1:0]         cn_sym,
  // decoded symbols
  input  logic [AW-1:0]               out_addr,
  output logic [DC-1:0][P-1:0]        out_sym
);
  logic [DC-1:0][Q-1:0][W-1:0] q_rd, q_perm, r_old, r_new, q_upd, q_wr;
  logic [DC-1:0][AW-1:0]       waddr;
  logic [DC-1:0][P-1:0]        hd;

  logic [DC-1:0][P-1:0]        o_zs;
  logic [Q-1:0][W-1:0]         o_e;
  logic [P-1:0][W-1:0]         o_m1;
  logic [P-1:0][CW-1:0]        o_col;
  logic [P-1:0][P-1:0]         o_sym;

  // input multiplexer: channel LLRs while loading, updated vectors otherwise
  always_comb
    for (int unsigned j = 0; j < DC; j++) begin
      q_wr[j]  = load_we ? llr_in[j] : q_upd[j];
      waddr[j] = load_we ? load_addr : addr[j];
    end

  vnmem #(.P(P), .W(W), .DC(DC)) u_vnmem (
    .clk(clk), .we(load_we | dec_we), .waddr(waddr), .wdata(q_wr),
    .raddr(addr), .rdata(q_rd));

  cnmem #(.P(P), .W(W), .DC(DC), .DV(DV)) u_cnmem (
    .clk(clk), .rst_n(rst_n), .clr(cn_clr), .we(dec_we), .waddr(layer),
    .w_zs(cn_zs), .w_e(cn_e), .w_m1(cn_m1), .w_col(cn_col), .w_sym(cn_sym),
    .raddr(layer),
    .r_zs(o_zs), .r_e(o_e), .r_m1(o_m1), .r_col(o_col), .r_sym(o_sym));

  dn #(.P(P), .W(W), .DC(DC)) u_dn_old (
    .zs(o_zs), .e(o_e), .bs_m1(o_m1), .bs_col(o_col), .bs_sym(o_sym), .r(r_old));

  dn #(.P(P), .W(W), .DC(DC)) u_dn_new (
    .zs(cn_zs), .e(cn_e), .bs_m1(cn_m1), .bs_col(cn_col), .bs_sym(cn_sym), .r(r_new));

  for (genvar j = 0; j < DC; j++) begin : g_col
    logic signed [Q-1:0][W:0] qt;
    logic [Q-1:0][W-1:0]      qa;

    gf_perm  #(.P(P), .W(W), .INVERSE(1'b0)) u_p (
      .din(q_rd[j]), .hexp(hexp[j]), .dout(q_perm[j]));
    v2c_sub  #(.Q(Q), .W(W)) u_sub (.qp(q_perm[j]), .r_old(r_old[j]), .qt(qt));
    llr_norm #(.P(P), .W(W)) u_norm (.qt(qt), .qn(qmn[j]), .z(z[j]));
    app_add  #(.Q(Q), .W(W)) u_add (.qn(qmn[j]), .r_new(r_new[j]), .qa(qa));
    gf_perm  #(.P(P), .W(W), .INVERSE(1'b1)) u_pinv (
      .din(qa), .hexp(hexp[j]), .dout(q_upd[j]));
    hard_dec #(.P(P), .W(W)) u_hd (.q(q_wr[j]), .sym(hd[j]));
  end

  // loading and decoding never share a cycle
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(load_we && dec_we));

  outmem #(.P(P), .DC(DC)) u_outmem (
    .clk(clk), .we(load_we | dec_we), .waddr(waddr), .wdata(hd),
    .raddr(out_addr), .rdata(out_sym));
endmodule
