// ref_harness: drives one decoder instance with random LLR frames (not
// codewords) and compares every final hard decision, and the decoding cycle
// count, with a behavioural model of the layered simplified basic-set
// min-max algorithm written with the testbench's own field arithmetic
// (permutation by field multiplication, saturation, ties, basic set,
// complement rule, delta offsets). Odd frames use small LLRs, which makes
// ties and near-ties frequent. Reports its counts through its ports.
module ref_harness
  import tb_ref_pkg::*;
#(
  parameter int P = 3, W = 5, DC = 5, DV = 3, IMAX = 4, NFRAMES = 6
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic fin
);
  localparam int Q = 1 << P, Z = Q - 1, AW = $clog2(Z), M = DV * Z, N = DC * Z;
  localparam int MAXV = (1 << W) - 1;

  logic rst_n, start, in_valid, in_ready, busy, done;
  logic [DC-1:0][Q-1:0][W-1:0] in_llr;
  logic [AW-1:0]               out_addr;
  logic [DC-1:0][P-1:0]        out_sym;

  // model state
  int qv [N][Q];
  bit cv [M];
  int c_zs [M][DC];
  int c_e [M][Q];
  int c_sym [M][8];
  int c_m1 [M][8];
  int c_col [M][8];

  nbldpc_decoder #(.P(P), .W(W), .DC(DC), .DV(DV), .IMAX(IMAX)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .in_valid(in_valid), .in_ready(in_ready),
    .in_llr(in_llr), .busy(busy), .done(done), .out_addr(out_addr), .out_sym(out_sym));

  function automatic int c2v(int l, int n, int a);
    int da;
    if (!cv[l]) return 0;
    da = a ^ c_zs[l][n];
    if (da == 0) return 0;
    return ref_c2v(da, n, c_sym[l], c_m1[l], c_col[l], c_e[l][da], P);
  endfunction

  task automatic model_layer(int b, int r);
    int l = b * Z + r;
    int qn [DC][Q];
    int z [DC];
    int nn [DC], h [DC];
    int beta = 0;
    int m1 [64], col [64], m2 [64];
    int s [8], v [8], c [8];
    for (int j = 0; j < DC; j++) begin
      int pos = (r + (b * j) % Z) % Z;
      int mn = 1 << 20;
      int qt [Q];
      nn[j] = j * Z + pos;
      h[j] = gf_alpha(pos, P);
      for (int a = 0; a < Q; a++) begin
        int x = qv[nn[j]][gf_mul(h[j], a, P)];
        qt[a] = (x == MAXV) ? x : x - c2v(l, j, a);
        if (qt[a] < mn) begin mn = qt[a]; z[j] = a; end
      end
      for (int a = 0; a < Q; a++) qn[j][a] = (qt[a] - mn > MAXV) ? MAXV : qt[a] - mn;
      beta ^= z[j];
    end
    // check node
    for (int a = 0; a < Q; a++) begin
      int colv [32];
      for (int j = 0; j < DC; j++) colv[j] = qn[j][a ^ z[j]];
      ref_psi(colv, DC, m1[a], col[a], m2[a]);
    end
    ref_phi(m1, col, P, s, v, c);
    cv[l] = 1;
    for (int j = 0; j < DC; j++) c_zs[l][j] = z[j] ^ beta;
    c_e[l][0] = 0;
    for (int a = 1; a < Q; a++) begin
      bit bs = 0;
      for (int i = 0; i < P; i++) if (s[i] == a) bs = 1;
      c_e[l][a] = bs ? m2[a] : m1[a];
    end
    for (int i = 0; i < P; i++) begin c_sym[l][i] = s[i]; c_m1[l][i] = v[i]; c_col[l][i] = c[i]; end
    // update
    for (int j = 0; j < DC; j++) begin
      int qa [Q];
      int hi = gf_inv(h[j], P);
      for (int a = 0; a < Q; a++) begin
        qa[a] = qn[j][a] + c2v(l, j, a);
        if (qa[a] > MAXV) qa[a] = MAXV;
      end
      for (int x = 0; x < Q; x++) qv[nn[j]][x] = qa[gf_mul(hi, x, P)];
    end
  endtask

  initial begin
    int mism;
    checks = 0; failures = 0; fin = 0;
    rst_n = 0; start = 0; in_valid = 0; out_addr = '0; in_llr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mism = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      automatic int beats = 0, cyc = 0;
      for (int n = 0; n < N; n++) begin
        automatic int zz = int'($urandom_range(Q - 1));
        for (int a = 0; a < Q; a++)
          qv[n][a] = (a == zz) ? 0 : int'($urandom_range((f % 2) ? 12 : MAXV));
      end
      for (int l = 0; l < M; l++) cv[l] = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (beats < Z) begin
        in_valid = 1;
        for (int j = 0; j < DC; j++)
          for (int a = 0; a < Q; a++) in_llr[j][a] = W'(qv[j * Z + beats][a]);
        beats++;
        @(negedge clk);
      end
      in_valid = 0;
      while (!done) begin cyc++; @(negedge clk); end
      checks++;
      if (cyc != IMAX * M) failures++;
      for (int it = 0; it < IMAX; it++)
        for (int b = 0; b < DV; b++)
          for (int r = 0; r < Z; r++) model_layer(b, r);
      for (int t = 0; t < Z; t++) begin
        out_addr = AW'(t);
        #1;
        for (int j = 0; j < DC; j++) begin
          automatic int mn = 1 << 20, hd = 0;
          for (int a = 0; a < Q; a++) if (qv[j * Z + t][a] < mn) begin mn = qv[j * Z + t][a]; hd = a; end
          checks++;
          if (int'(out_sym[j]) != hd) begin failures++; mism++; end
        end
      end
    end
    $display("GF(%0d), %0d x %0d circulants, %0d iterations: %0d hard decisions differ from the model",
             Q, DV, DC, IMAX, mism);
    fin = 1;
  end
endmodule
