// tb_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL: GF(2^p) multiplication by shift-and-reduce,
// inversion by search, a span test by subset enumeration, and the
// reference check node / decompression functions built on them.
package tb_ref_pkg;

  function automatic int gf_poly(int p);
    case (p)
      3: return 'hB;
      4: return 'h13;
      5: return 'h25;
      6: return 'h43;
      default: return 'h25;
    endcase
  endfunction

  function automatic int gf_mul(int a, int b, int p);
    int r = 0;
    int x = a;
    for (int i = 0; i < p; i++) begin
      if ((b >> i) & 1) r ^= x;
      x = x << 1;
      if ((x >> p) & 1) x ^= gf_poly(p);
    end
    return r;
  endfunction

  function automatic int gf_alpha(int e, int p);
    int v = 1;
    for (int i = 0; i < e; i++) v = gf_mul(v, 2, p);
    return v;
  endfunction

  function automatic int gf_inv(int a, int p);
    for (int x = 1; x < (1 << p); x++)
      if (gf_mul(a, x, p) == 1) return x;
    return 0;
  endfunction

  // true when v is the XOR of some subset of basis[0..n-1]
  function automatic bit in_span(int v, int basis[8], int n);
    for (int s = 0; s < (1 << n); s++) begin
      int x = 0;
      for (int l = 0; l < n; l++) if ((s >> l) & 1) x ^= basis[l];
      if (x == v) return 1'b1;
    end
    return 1'b0;
  endfunction

  // Psi of one trellis row: values v[0..dc-1]
  function automatic void ref_psi(int v[32], int dc, output int m1, output int col,
                                  output int m2);
    m1 = 1 << 30; col = 0; m2 = 1 << 30;
    for (int j = 0; j < dc; j++) if (v[j] < m1) begin m1 = v[j]; col = j; end
    for (int j = 0; j < dc; j++) if (j != col && v[j] < m2) m2 = v[j];
  endfunction

  // Phi: p independent elements with the smallest m1 (ties: smaller element)
  function automatic void ref_phi(int m1[64], int col[64], int p,
                                  output int bs_sym[8], output int bs_m1[8],
                                  output int bs_col[8]);
    int order[64];
    int q = 1 << p;
    int n = 0;
    int t;
    for (int a = 0; a < q - 1; a++) order[a] = a + 1;
    for (int i = 0; i < q - 1; i++)
      for (int k = i + 1; k < q - 1; k++)
        if (m1[order[k]] < m1[order[i]] ||
            (m1[order[k]] == m1[order[i]] && order[k] < order[i])) begin
          t = order[i]; order[i] = order[k]; order[k] = t;
        end
    for (int i = 0; i < q - 1 && n < p; i++)
      if (!in_span(order[i], bs_sym, n)) begin
        bs_sym[n] = order[i]; bs_m1[n] = m1[order[i]]; bs_col[n] = col[order[i]]; n++;
      end
  endfunction

  // Simplified C2V message of column n in the delta domain, element a != 0
  function automatic int ref_c2v(int a, int n, int bs_sym[8], int bs_m1[8],
                                 int bs_col[8], int e, int p);
    int dq = bs_m1[p - 1];
    bit hit = 0;
    for (int s = 1; s < (1 << p); s++) begin
      int x = 0;
      for (int l = 0; l < p; l++) if ((s >> l) & 1) x ^= bs_sym[l];
      if (x == a)
        for (int l = 0; l < p; l++) if (((s >> l) & 1) && bs_col[l] == n) hit = 1;
    end
    for (int l = 0; l < p; l++) if (bs_sym[l] == a) dq = bs_m1[l];
    return hit ? e : dq;
  endfunction

endpackage
