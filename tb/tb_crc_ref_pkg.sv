// tb_crc_ref_pkg -- reference arithmetic for the testbenches.
//
// Everything here is computed straight from the polynomial definitions, with
// no table and none of the design's shortcuts: x^p mod g by repeated
// multiplication, the smallest single error position by scanning p, the
// next element from the congruence it must satisfy, and the one's-complement
// checksum of a word array.  Polynomials are held in 64-bit vectors (bit i =
// coefficient of x^i), so n may go up to 32.
package tb_crc_ref_pkg;

  typedef bit [63:0] poly_t;

  // a * x mod g, with a of degree < n
  function automatic poly_t mulx(poly_t a, int n, poly_t g);
    poly_t r;
    r = a << 1;
    if (r[n]) r = r ^ g;
    return r;
  endfunction

  // x^p mod g
  function automatic poly_t xpow(int p, int n, poly_t g);
    poly_t r = 1;
    for (int i = 0; i < p; i++) r = mulx(r, n, g);
    return r;
  endfunction

  // (a * b) mod g for a, b of degree < n
  function automatic poly_t mulmod(poly_t a, poly_t b, int n, poly_t g);
    poly_t r = 0;
    poly_t t = a;
    for (int i = 0; i < n; i++) begin
      if (b[i]) r = r ^ t;
      t = mulx(t, n, g);
    end
    return r;
  endfunction

  // smallest p in [0, maxp) with x^p mod g == s, or -1
  function automatic int first_pos(poly_t s, int n, poly_t g, int maxp);
    poly_t r = 1;
    for (int p = 0; p < maxp; p++) begin
      if (r == s) return p;
      r = mulx(r, n, g);
    end
    return -1;
  endfunction

  // period of x modulo g
  function automatic int period(int n, poly_t g);
    poly_t r = mulx(1, n, g);
    int p = 1;
    while (r != 1 && p < (1 << n)) begin
      r = mulx(r, n, g);
      p++;
    end
    return p;
  endfunction

  // one's-complement 16-bit addition
  function automatic bit [15:0] oadd(bit [15:0] a, bit [15:0] b);
    bit [16:0] t = {1'b0, a} + {1'b0, b};
    return t[15:0] + 16'(t[16]);
  endfunction

endpackage
