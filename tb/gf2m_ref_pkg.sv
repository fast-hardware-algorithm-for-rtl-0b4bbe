// gf2m_ref_pkg: reference arithmetic for the divider testbenches.
// Polynomials over GF(2) are held in a 1024-bit vector (bit i = coefficient
// of x^i); the field degree m is an argument, so one function serves every
// size up to m = 1022.
package gf2m_ref_pkg;
  typedef logic [1023:0] poly_t;

  // a * b mod g in GF(2^m), shift-and-add from the top coefficient of b
  function automatic poly_t gf_mul(poly_t a, poly_t b, poly_t g, int m);
    poly_t r = '0;
    for (int i = m - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[m]) r ^= g;
      if (b[i]) r ^= a;
    end
    return r;
  endfunction

  // m random coefficients
  function automatic poly_t rand_poly(int m);
    poly_t x = '0;
    for (int i = 0; i < m; i++) x[i] = 1'($urandom);
    return x;
  endfunction
endpackage
