// booth_mac: 16 x 16-bit multiply-accumulate cell, c[i] = a[i]*b[i] + c[i-1].
//
// The Booth carry-save array reduces a*b + c[i-1] to a sum and a carry vector, and a 32-bit
// conditional sum adder adds them; the result is stored in the accumulator register on every
// enabled clock. With `clr` high the accumulate operand is 0 instead of the register, which
// starts a new inner product (c[-1] = 0). One multiply-accumulate per clock, so an inner
// product of 16 terms takes 16 enabled clocks; `c_next` is the value the register takes at
// the coming edge and `acc` the value it holds. Arithmetic is two's complement modulo 2^32.
// The structure follows the design; the enable, the synchronous reset and the `c_next` port
// are this design's own choices.
module booth_mac
  import dct_pkg::*;
(
  input  logic  clk,
  input  logic  rst,     // synchronous, clears the accumulator
  input  logic  en,      // perform one multiply-accumulate this clock
  input  logic  clr,     // use 0 instead of the accumulator as c[i-1]
  input  word_t a,       // image data
  input  word_t b,       // coefficient
  output acc_t  c_next,  // a*b + c[i-1], combinational
  output acc_t  acc      // accumulator register
);

  acc_t          c_prev;
  logic [AW-1:0] cs_sum, cs_carry;
  logic          unused_cout;

  assign c_prev = clr ? '0 : acc;

  booth_mult_array u_array (
    .a     (a),
    .b     (b),
    .c     (c_prev),
    .sum   (cs_sum),
    .carry (cs_carry)
  );

  cond_sum_adder #(.W(AW)) u_adder (
    .x    (cs_sum),
    .y    (cs_carry),
    .cin  (1'b0),
    .sum  (c_next),
    .cout (unused_cout)
  );

  always_ff @(posedge clk) begin
    if (rst)     acc <= '0;
    else if (en) acc <= c_next;
  end

endmodule
