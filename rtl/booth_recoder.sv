// booth_recoder: bit-pair (radix-4, "modified Booth") recoding of the multiplier operand B.
//
// Each recoder looks at three bits of B, the pair b[2i+1], b[2i] and the overlap bit b[2i-1],
// and produces the digit d = -2*b[2i+1] + b[2i] + b[2i-1] in -2..+2. The digit leaves as the
// select lines of the multiplier cells of one row: `one` (|d| = 1), `two` (|d| = 2) and
// `neg` (d < 0). The pattern 111 (d = -0) is given neg = 0 so that a zero row adds nothing.
// Purely combinational. The recoding rule is the standard one the design names; the
// one/two/neg encoding of the digit is this design's own choice.
module booth_recoder
  import dct_pkg::*;
(
  input  logic         b_hi,   // b[2i+1]
  input  logic         b_mid,  // b[2i]
  input  logic         b_lo,   // b[2i-1], 0 for the lowest pair
  output booth_digit_t digit
);

  always_comb begin
    digit.one = b_mid ^ b_lo;
    digit.two = (b_hi & ~b_mid & ~b_lo) | (~b_hi & b_mid & b_lo);
    digit.neg = b_hi & ~(b_mid & b_lo);
  end

endmodule
