// gf2m_pkg: field constants and elaboration-time helpers shared by the
// GF(2^m) serial-out multipliers.
//
// A field element is an m-bit vector of polynomial-basis coordinates,
// bit k holding the coefficient of x^k. A field polynomial F is stored as
// an (m+1)-bit vector with bit m set. The two fields used by the design,
// GF(2^163) and GF(2^233), take the NIST-recommended reduction polynomials
// x^163 + x^7 + x^6 + x^3 + 1 (a pentanomial) and x^233 + x^74 + 1 (a
// trinomial); the field sizes follow the text, the polynomials are this
// design's choice. MAXM bounds the widths the helper functions work on.
package gf2m_pkg;

  localparam int MAXM = 256;

  localparam int M163 = 163;
  localparam logic [M163:0] POLY163 =
      (164'(1) << 163) | (164'(1) << 7) | (164'(1) << 6) | (164'(1) << 3) | 164'(1);

  localparam int M233 = 233;
  localparam int T233 = 74;

  // Number of bits of a counter that counts 0 .. m-1.
  function automatic int count_bits(int m);
    int n = 1;
    while ((1 << n) < m) n++;
    return n;
  endfunction

  // Row mask of one offset of the Mastrovito decomposition.
  // Product coordinate c_i is the XOR over n of r(n,i) * d_n, where d_n is
  // coefficient n of the unreduced product A*B and r(n,i) is coordinate i
  // of x^n mod F. Grouping the terms by offset delta = n - i gives
  //   c_i = XOR_delta  mask_delta[i] * d_(i+delta),
  // and this function returns mask_delta (bit i = r(i+delta, i)).
  // x^n mod F is stepped from x^0 to x^(2m-2) by shift-and-reduce.
  function automatic logic [MAXM-1:0] offset_mask(int m, logic [MAXM:0] f, int delta);
    logic [MAXM:0]   v;
    logic [MAXM-1:0] mask;
    v    = '0;
    v[0] = 1'b1;
    mask = '0;
    for (int n = 0; n <= 2*m-2; n++) begin
      if (n - delta >= 0 && n - delta < m) mask[n-delta] = v[n-delta];
      v = v << 1;
      if (v[m]) v = v ^ f;
    end
    return mask;
  endfunction

endpackage
