// dct_ref_pkg: reference arithmetic for the testbenches, computed independently of the RTL.
//
// Coefficients come straight from the cosine (real arithmetic), not from the RTL's table:
//   b(u,j) = round(2^15 * m(u) * cos((2j+1) u pi / 32)),  m(0) = 1/sqrt(2), m(u>0) = 1.
package dct_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int rnd(input real x);
    if (x >= 0.0) return $rtoi(x + 0.5);
    else          return -$rtoi(-x + 0.5);
  endfunction

  function automatic int ref_coef(input int u, input int j);
    if (u == 0) return rnd(32768.0 / $sqrt(2.0));
    return rnd(32768.0 * $cos(real'((2 * j + 1) * u) * PI / 32.0));
  endfunction

  // exact 2D DCT of a 16x16 block (real), Y(q,p): q vertical, p horizontal frequency
  function automatic real dct2_real(input int blk [16][16], input int q, input int p);
    real s, mq, mp;
    s  = 0.0;
    mq = (q == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    mp = (p == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        s += real'(blk[r][c]) * $cos(real'((2 * r + 1) * q) * PI / 32.0)
                              * $cos(real'((2 * c + 1) * p) * PI / 32.0);
    return 4.0 * mq * mp / 256.0 * s;
  endfunction

endpackage
