// dct_pkg: sizes and constants shared by the 16x16 two-dimensional DCT datapath.
//
// The transform is computed as two passes of the one-dimensional DCT
//   C(u) = (2 m(u) / N) * sum_j a[j] * cos((2j+1) u pi / 2N),  m(0) = 1/sqrt(2), m(u>0) = 1
// with N = 16. Each pass multiplies 16-bit data by 16-bit coefficients and accumulates the
// products in 32 bits. The coefficient of row u, column j is stored as the signed integer
//   b(u,j) = round(2^18 * (2 m(u) / N) * cos((2j+1) u pi / 32))
//          = round(2^15 * m(u) * cos((2j+1) u pi / 32)),
// i.e. 18 fraction bits; the largest magnitude, 2^15 cos(pi/32) = 32610, fits a signed 16-bit
// word. The coefficients are derived from the quarter-wave table COS_Q15 below:
//   COS_Q15[k] = round(2^15 * cos(k pi / 32)),  k = 0..16,
// and the symmetries of the cosine give every other angle. The 16 x 16 block size, the 16-bit
// operands and the 32-bit accumulation follow the design; the fraction-bit placement is this
// design's own choice.
package dct_pkg;

  localparam int unsigned N         = 16;  // block size, pixels per row and per column
  localparam int unsigned DW        = 16;  // data and coefficient word width
  localparam int unsigned AW        = 32;  // accumulator / final adder width

  typedef logic signed [DW-1:0] word_t;
  typedef logic signed [AW-1:0] acc_t;

  // One radix-4 (bit-pair) Booth digit in -2..+2, as the select lines of a multiplier cell:
  // one = magnitude 1, two = magnitude 2, neg = negative (neither one nor two means zero).
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_digit_t;

  // round(2^15 * cos(k*pi/32)) for k = 0..16
  localparam int COS_Q15 [17] = '{32768, 32610, 32138, 31357, 30274, 28899, 27246, 25330,
                                  23170, 20788, 18205, 15447, 12540, 9512, 6393, 3212, 0};

  // round(2^15 / sqrt(2)): the m(0) row
  localparam int DC_COEF = 23170;

  // Coefficient b(u,j) as a signed 16-bit word.
  function automatic word_t dct_coef(input int unsigned u, input int unsigned j);
    int unsigned k;
    if (u == 0) return word_t'(DC_COEF);
    k = ((2 * j + 1) * u) % 64;            // angle k*pi/32; the period 2*pi is k = 64
    if (k > 32) k = 64 - k;                 // cos(2pi - x) = cos(x)
    if (k > 16) return word_t'(-COS_Q15[32 - k]);   // cos(pi - x) = -cos(x)
    return word_t'(COS_Q15[k]);
  endfunction

endpackage
