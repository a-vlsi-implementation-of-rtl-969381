// booth_mult_array: the multiplier section of the MAC, a trapezoidal carry-save array.
//
// It reduces a*b + c (a, b signed 16-bit, c a 32-bit accumulate operand) to two 32-bit
// vectors, sum and carry, whose sum modulo 2^32 is the result; the conditional sum adder
// finishes the addition. B is recoded into B_W/2 = 8 radix-4 Booth digits, so the array has 8
// rows of multiplier cells instead of 16. Row i is shifted two columns left of row i-1 and
// spans columns 2i..31, which gives the array its trapezoidal shape; every row is
// sign-extended to bit 31 by feeding the multiplicand's sign bit to its upper cells.
// The widths are parameters (A_W x B_W operands, P_W-bit result): the MAC uses 16 x 16 -> 32,
// and 4 x 4 -> 8 gives the small two-row array used to explain the structure.
//   row 0     : half-adder cells, sum-in = c[j]   (accumulate input)
//   row i > 0 : full-adder cells, sum-in = sum-out above, carry-in = carry-out above-right
// A column whose last cell has been passed leaves its pending sum and carry to the output
// vectors. The +1 of a negative digit ("add 1") goes into the carry vector at the row's
// lowest column, a position no carry reaches. Purely combinational.
// Recoding of B, carry-save rows, half adders on top and sign extension follow the design;
// where the accumulate operand and the add-1 bits enter is this design's own arrangement.
module booth_mult_array
  import dct_pkg::*;
#(
  parameter int unsigned A_W = DW,   // multiplicand width
  parameter int unsigned B_W = DW,   // multiplier width (even)
  parameter int unsigned P_W = AW    // width of accumulate operand and result
) (
  input  logic signed [A_W-1:0] a,      // multiplicand (image data)
  input  logic signed [B_W-1:0] b,      // multiplier, Booth-recoded (coefficient)
  input  logic signed [P_W-1:0] c,      // accumulate operand
  output logic        [P_W-1:0] sum,
  output logic        [P_W-1:0] carry
);

  localparam int ROWS = B_W / 2;

  // multiplicand bit k, zero below bit 0 and sign-extended above bit A_W-1
  function automatic logic a_bit(input logic [A_W-1:0] av, input int k);
    if (k < 0)        return 1'b0;
    else if (k < A_W) return av[k];
    else              return av[A_W-1];
  endfunction

  booth_digit_t digit [ROWS];

  for (genvar i = 0; i < ROWS; i++) begin : g_rec
    booth_recoder u_rec (
      .b_hi  (b[2*i+1]),
      .b_mid (b[2*i]),
      .b_lo  ((i == 0) ? 1'b0 : b[2*i-1]),
      .digit (digit[i])
    );
  end

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    logic [P_W-1:0] so;
    logic [P_W-1:0] co;
    for (genvar j = 0; j < P_W; j++) begin : g_col
      if (j < 2 * i) begin : g_none
        assign so[j] = 1'b0;
        assign co[j] = 1'b0;
      end else begin : g_cell
        logic si_w, ci_w;
        if (i == 0) begin : g_top
          assign si_w = c[j];
          assign ci_w = 1'b0;
        end else begin : g_mid
          assign si_w = g_row[i-1].so[j];
          assign ci_w = g_row[i-1].co[j-1];
        end
        mult_cell #(.HALF_ADDER(i == 0)) u_cell (
          .digit (digit[i]),
          .a     (a_bit(a, j - 2*i)),
          .am1   (a_bit(a, j - 2*i - 1)),
          .si    (si_w),
          .ci    (ci_w),
          .so    (so[j]),
          .co    (co[j])
        );
      end
    end
  end

  // Output vectors: column j was last touched by row min(ROWS-1, j/2).
  for (genvar j = 0; j < P_W; j++) begin : g_out
    localparam int LAST = (j / 2 < ROWS - 1) ? j / 2 : ROWS - 1;
    assign sum[j] = g_row[LAST].so[j];
    if (j % 2 == 0 && j / 2 <= ROWS - 1) begin : g_add1
      assign carry[j] = digit[j/2].neg;          // +1 of a negative row
    end else if (j == 0) begin : g_zero
      assign carry[j] = 1'b0;
    end else begin : g_co
      assign carry[j] = g_row[LAST].co[j-1];
    end
  end

endmodule
