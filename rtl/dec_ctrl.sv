// dec_ctrl: decoder controller. A frame goes through four phases:
//   IDLE  -> start       : clears the check node memory, enters LOAD
//   LOAD  (in_ready = 1) : each accepted beat (in_valid) writes one row of DC
//                          channel LLR vectors at address 0 .. q-2
//   DEC                  : IMAX iterations x DV*(q-1) layers, one layer per
//                          clock cycle, no stalls
//   DONE  (done = 1)     : decoded symbols stay readable; start begins a
//                          new frame
// For layer l = b*(q-1) + r (block row b, row r) and block column j the
// nonzero entry of H sits at circulant column s = (r + base_exp(b,j)) mod
// (q-1) with coefficient alpha^s, so addr[j] = hexp[j] = s (alpha-multiplied
// circulant permutation matrices). The document states one layer per clock
// and the circulant structure; the handshake, the phases and the base
// exponents are this design's choices.
module dec_ctrl
  import nb_pkg::*;
#(
  parameter int unsigned P    = P_DEF,
  parameter int unsigned DC   = DC_DEF,
  parameter int unsigned DV   = DV_DEF,
  parameter int unsigned IMAX = IMAX_DEF,
  localparam int unsigned Z   = (1 << P) - 1,
  localparam int unsigned AW  = $clog2(Z),
  localparam int unsigned M   = DV * Z,
  localparam int unsigned LW  = $clog2(M),
  localparam int unsigned BW  = (DV > 1) ? $clog2(DV) : 1,
  localparam int unsigned IW  = (IMAX > 1) ? $clog2(IMAX) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  in_valid,
  output logic                  in_ready,
  output logic                  load_we,
  output logic [AW-1:0]         load_addr,
  output logic                  cn_clr,
  output logic                  dec_we,
  output logic [LW-1:0]         layer,
  output logic [DC-1:0][AW-1:0] addr,
  output logic [DC-1:0][P-1:0]  hexp,
  output logic [IW-1:0]         iter,
  output logic                  busy,
  output logic                  done
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_DEC, S_DONE} state_e;
  state_e state;

  logic [AW-1:0] row;      // row inside the block row, also load address
  logic [BW-1:0] brow;     // block row
  logic [LW-1:0] lay;

  wire last_row  = (row == AW'(Z - 1));
  wire last_brow = (brow == BW'(DV - 1));
  wire last_iter = (iter == IW'(IMAX - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE;
      row   <= '0;
      brow  <= '0;
      lay   <= '0;
      iter  <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE:
          if (start) begin
            state <= S_LOAD;
            row   <= '0;
          end
        S_LOAD:
          if (in_valid) begin
            row <= last_row ? '0 : row + 1'b1;
            if (last_row) begin
              state <= S_DEC;
              brow  <= '0;
              lay   <= '0;
              iter  <= '0;
            end
          end
        S_DEC: begin
          row <= last_row ? '0 : row + 1'b1;
          lay <= (last_row && last_brow) ? '0 : lay + 1'b1;
          if (last_row) brow <= last_brow ? '0 : brow + 1'b1;
          if (last_row && last_brow) begin
            if (last_iter) state <= S_DONE;
            else           iter  <= iter + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end

  assign in_ready  = (state == S_LOAD);
  assign load_we   = in_ready && in_valid;
  assign load_addr = row;
  assign cn_clr    = (state == S_IDLE || state == S_DONE) && start;
  assign dec_we    = (state == S_DEC);
  assign layer     = lay;
  assign busy      = (state == S_LOAD) || (state == S_DEC);
  assign done      = (state == S_DONE);

  // a start pulse is only acted on while idle or done
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
                                 (busy && start) |=> busy);

  // circulant column of the nonzero entry in each block column
  for (genvar j = 0; j < DC; j++) begin : g_col
    logic [DV-1:0][AW-1:0] be;
    for (genvar b = 0; b < DV; b++) begin : g_brow
      localparam int unsigned BE = base_exp(b, j, Z);
      assign be[b] = AW'(BE);
    end
    always_comb begin
      logic [AW:0] s;
      s = {1'b0, row} + {1'b0, be[brow]};
      if (s >= (AW+1)'(Z)) s = s - (AW+1)'(Z);
      addr[j] = s[AW-1:0];
      hexp[j] = P'(s[AW-1:0]);
    end
  end
endmodule
