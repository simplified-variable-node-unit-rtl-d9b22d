// tb_vnp: the testbench plays controller and check node processor around
// the variable node processor. It loads random channel vectors, then runs
// layers with random addresses, coefficients and check node outputs (layer
// numbers repeat, so stored messages are subtracted again). Each cycle it
// checks the V2C vectors and hard decisions sent to the check node against
// a reference model (permutation by field multiplication, subtraction of
// the rebuilt old message, normalization), then updates its model of both
// memories with the expected write-back, and finally compares the output
// memory with the hard decisions of the model.
module tb_vnp;
  import tb_ref_pkg::*;
  localparam int P = 5, W = 5, DC = 27, DV = 4, Q = 1 << P, Z = Q - 1;
  localparam int AW = $clog2(Z), CW = $clog2(DC + 1), M = DV * Z, LW = $clog2(M);
  int checks = 0, failures = 0, reused = 0;
  logic clk = 0, rst_n, load_we, cn_clr, dec_we;
  logic [AW-1:0] load_addr, out_addr;
  logic [DC-1:0][Q-1:0][W-1:0] llr_in, qmn;
  logic [LW-1:0] layer;
  logic [DC-1:0][AW-1:0] addr;
  logic [DC-1:0][P-1:0]  hexp, z, cn_zs, out_sym;
  logic [Q-1:0][W-1:0]  cn_e;
  logic [P-1:0][W-1:0]  cn_m1;
  logic [P-1:0][CW-1:0] cn_col;
  logic [P-1:0][P-1:0]  cn_sym;

  // models
  int vq [DC][Z][Q];
  bit cv [M];
  int c_zs [M][DC];
  int c_e [M][Q];
  int c_sym [M][8];
  int c_m1 [M][8];
  int c_col [M][8];
  int qsave [DC][Q];

  vnp #(.P(P), .W(W), .DC(DC), .DV(DV)) dut (
    .clk(clk), .rst_n(rst_n), .load_we(load_we), .load_addr(load_addr), .llr_in(llr_in),
    .cn_clr(cn_clr), .dec_we(dec_we), .layer(layer), .addr(addr), .hexp(hexp),
    .qmn(qmn), .z(z), .cn_zs(cn_zs), .cn_e(cn_e), .cn_m1(cn_m1), .cn_col(cn_col),
    .cn_sym(cn_sym), .out_addr(out_addr), .out_sym(out_sym));
  always #5 clk = ~clk;

  function automatic int ref_r(int l, int n, int a);
    int da;
    if (!cv[l]) return 0;
    da = a ^ c_zs[l][n];
    if (da == 0) return 0;
    return ref_c2v(da, n, c_sym[l], c_m1[l], c_col[l], c_e[l][da], P);
  endfunction

  function automatic int argmin(int v[Q]);
    int k = 0;
    for (int a = 1; a < Q; a++) if (v[a] < v[k]) k = a;
    return k;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; load_we = 0; dec_we = 0; cn_clr = 0; layer = '0; out_addr = '0;
    addr = '0; hexp = '0; load_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    cn_clr = 1;
    @(negedge clk);
    cn_clr = 0;
    for (int l = 0; l < M; l++) cv[l] = 0;
    // load
    for (int t = 0; t < Z; t++) begin
      load_we = 1;
      load_addr = AW'(t);
      for (int j = 0; j < DC; j++) begin
        automatic int zz = int'($urandom_range(Q - 1));
        for (int a = 0; a < Q; a++) begin
          vq[j][t][a] = (a == zz) ? 0 : int'($urandom_range(31, 1));
          llr_in[j][a] = W'(vq[j][t][a]);
        end
      end
      @(negedge clk);
    end
    load_we = 0;
    for (int t = 0; t < Z; t++) begin
      out_addr = AW'(t);
      #1;
      for (int j = 0; j < DC; j++) begin
        checks++;
        if (int'(out_sym[j]) != argmin(vq[j][t])) failures++;
      end
    end
    // layers
    for (int t = 0; t < 40; t++) begin
      automatic int l = t % 6;
      int basis[8];
      int ad[DC], h[DC];
      layer = LW'(l);
      if (cv[l]) reused++;
      dec_we = 1;
      for (int j = 0; j < DC; j++) begin
        ad[j] = int'($urandom_range(Z - 1));
        addr[j] = AW'(ad[j]);
        hexp[j] = P'($urandom_range(Z - 1));
        h[j] = gf_alpha(int'(hexp[j]), P);
        cn_zs[j] = P'($urandom);
      end
      for (int i = 0; i < P; i++) begin
        int x;
        do x = int'($urandom_range(Q - 1, 1)); while (in_span(x, basis, i));
        basis[i] = x;
        cn_sym[i] = P'(x);
        cn_m1[i] = W'(i * 3 + int'($urandom_range(2)));
        cn_col[i] = CW'($urandom_range(DC - 1));
      end
      for (int a = 0; a < Q; a++) cn_e[a] = (a == 0) ? '0 : W'($urandom);
      #1;
      for (int j = 0; j < DC; j++) begin
        int qt[Q], mn, zz, qn[Q];
        mn = 1000; zz = 0;
        for (int a = 0; a < Q; a++) begin
          qt[a] = vq[j][ad[j]][gf_mul(h[j], a, P)];
          if (qt[a] != 31) qt[a] -= ref_r(l, j, a);
          if (qt[a] < mn) begin mn = qt[a]; zz = a; end
        end
        checks++;
        if (int'(z[j]) != zz) failures++;
        for (int a = 0; a < Q; a++) begin
          qn[a] = (qt[a] - mn > 31) ? 31 : qt[a] - mn;
          checks++;
          if (int'(qmn[j][a]) != qn[a]) failures++;
        end
        c_zs[l][j] = int'(cn_zs[j]);
        for (int a = 0; a < Q; a++) qsave[j][a] = qn[a];
      end
      for (int a = 0; a < Q; a++) c_e[l][a] = int'(cn_e[a]);
      for (int i = 0; i < P; i++) begin
        c_sym[l][i] = int'(cn_sym[i]); c_m1[l][i] = int'(cn_m1[i]); c_col[l][i] = int'(cn_col[i]);
      end
      cv[l] = 1;
      for (int j = 0; j < DC; j++) begin
        int qa[Q], hi;
        hi = gf_inv(h[j], P);
        for (int a = 0; a < Q; a++) begin
          automatic int s = qsave[j][a] + ref_r(l, j, a);
          qa[a] = (s > 31) ? 31 : s;
        end
        for (int b = 0; b < Q; b++) vq[j][ad[j]][b] = qa[gf_mul(hi, b, P)];
      end
      @(negedge clk);
    end
    dec_we = 0;
    for (int t = 0; t < Z; t++) begin
      out_addr = AW'(t);
      #1;
      for (int j = 0; j < DC; j++) begin
        checks++;
        if (int'(out_sym[j]) != argmin(vq[j][t])) failures++;
      end
    end
    checks++;
    if (reused == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
