// nb_pkg: Galois-field helpers and default code sizes shared by the
// nonbinary LDPC decoder.
//
// Field elements of GF(2^p) are held in vector (polynomial) form, so field
// addition is a bitwise XOR and an LLR vector is indexed by the integer value
// of the element's polynomial. alpha is the root of a fixed primitive
// polynomial (x^5+x^2+1 for GF(32)); the choice of polynomial is this
// design's own, any primitive polynomial works. Every function here is meant
// to be evaluated at elaboration time to build constant wiring; none of them
// ends up as logic.
//
// The parity-check matrix is quasi-cyclic: a DV x DC array of (q-1)x(q-1)
// alpha-multiplied circulant permutation matrices. Row r of block (b,j) has
// its nonzero entry alpha^s at column s = (r + base_exp(b,j)) mod (q-1).
// The base exponents (b*j) mod (q-1) are this design's choice (an array-code
// layout); change base_exp to decode another code of the same shape.
package nb_pkg;

  // Code of the design: (837,726) over GF(32), dv = 4, dc = 27.
  localparam int unsigned P_DEF    = 5;    // p = log2 q
  localparam int unsigned W_DEF    = 5;    // LLR bits
  localparam int unsigned DC_DEF   = 27;   // check node degree
  localparam int unsigned DV_DEF   = 4;    // variable node degree = block rows
  localparam int unsigned IMAX_DEF = 8;    // decoding iterations

  // Primitive polynomial of GF(2^p), bit i is the coefficient of x^i.
  function automatic int unsigned prim_poly(int unsigned p);
    case (p)
      2:       return 'b111;
      3:       return 'b1011;
      4:       return 'b10011;
      5:       return 'b100101;
      6:       return 'b1000011;
      7:       return 'b10001001;
      8:       return 'b100011101;
      default: return 'b100101;
    endcase
  endfunction

  // alpha^k in vector form.
  function automatic int unsigned gf_exp(int unsigned k, int unsigned p);
    int unsigned v;
    int unsigned n;
    v = 1;
    n = k % ((1 << p) - 1);
    for (int unsigned i = 0; i < n; i++) begin
      v = v << 1;
      if (((v >> p) & 1) != 0) v = v ^ prim_poly(p);
    end
    return v;
  endfunction

  // Discrete logarithm of a nonzero element a (returns 0 for a = 0).
  function automatic int unsigned gf_log(int unsigned a, int unsigned p);
    for (int unsigned k = 0; k < (1 << p) - 1; k++)
      if (gf_exp(k, p) == a) return k;
    return 0;
  endfunction

  // Exponent offset of the circulant in block row b, block column j.
  function automatic int unsigned base_exp(int unsigned b, int unsigned j, int unsigned z);
    return (b * j) % z;
  endfunction

endpackage
