// mult_cell: one cell "M" of the Booth multiplier array.
//
// The cell receives two adjacent bits of the multiplicand, A_i (a) and A_(i-1) (am1), and the
// Booth digit of its row. It selects the partial-product bit (0, A_i or A_(i-1), inverted for
// a negative digit; the +1 that completes the two's complement of a negative row enters
// separately at the row's lowest column) and adds it to the sum-in and carry-in coming from
// the row above, giving sum-out and carry-out for the row below (carry-save). Cells of the
// top row are half adders: they have no carry-in, and their sum-in is a bit of the
// accumulate operand. Cells beyond the top of the multiplicand see the sign bit on both
// inputs, which sign-extends the row.
// The two circuit variants of this cell (redundant complement generation or extra inverters)
// compute the same function; this logic stands for both. Purely combinational.
module mult_cell
  import dct_pkg::*;
#(
  parameter bit HALF_ADDER = 1'b0   // 1: top-row cell, carry-in ignored
) (
  input  booth_digit_t digit,
  input  logic         a,     // A_i
  input  logic         am1,   // A_(i-1)
  input  logic         si,    // sum-in
  input  logic         ci,    // carry-in
  output logic         so,    // sum-out
  output logic         co     // carry-out
);

  logic pp;
  logic cin;

  always_comb begin
    pp  = ((digit.one & a) | (digit.two & am1)) ^ digit.neg;
    cin = HALF_ADDER ? 1'b0 : ci;
    so  = pp ^ si ^ cin;
    co  = (pp & si) | (pp & cin) | (si & cin);
  end

endmodule
