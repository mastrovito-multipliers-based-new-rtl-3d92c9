// tb_gf_pkg: reference arithmetic for the GF(2^m) testbenches.
// gf_mul forms the full carry-less product of a and b and then reduces it
// by long division with the field polynomial f, from the top bit down, a
// different route from the hardware, which never forms the full product.
// rand_elem returns a random m-bit field element.
package tb_gf_pkg;

  localparam int W = 256;

  function automatic logic [W-1:0] gf_mul(int m, logic [W:0] f, logic [W-1:0] a, logic [W-1:0] b);
    logic [2*W-1:0] p;
    p = '0;
    for (int k = 0; k < m; k++)
      if (b[k]) p = p ^ ((2*W)'(a) << k);
    for (int n = 2*m-2; n >= m; n--)
      if (p[n]) p = p ^ ((2*W)'(f) << (n-m));
    return p[W-1:0];
  endfunction

  function automatic logic [W-1:0] rand_elem(int m);
    logic [W-1:0] v;
    for (int k = 0; k < W; k += 32) v[k +: 32] = $urandom;
    for (int k = m; k < W; k++) v[k] = 1'b0;
    return v;
  endfunction

endpackage
