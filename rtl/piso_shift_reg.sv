// piso_shift_reg: parallel-word-in, serial-word-out output shift register.
//
// `load` captures 16 words at once, with their valid flags; each enabled clock without a
// load moves the register one word towards position 0, whose word and flag are the outputs.
// A load on the clock that shifts out the last word of the previous load loses nothing,
// so one load every 16 enabled clocks gives a continuous stream of one word per clock.
// Load has priority over shift; an assertion flags a load that would drop waiting words. Its function follows the design; the valid flags and the
// enable are this design's own additions.
module piso_shift_reg
  import dct_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,                 // shift one word
  input  logic  load,
  input  logic  load_valid,
  input  word_t din [DEPTH],
  output word_t dout,
  output logic  dout_valid
);

  word_t            q [DEPTH];
  logic [DEPTH-1:0] v;

  always_ff @(posedge clk) begin
    if (rst) begin
      v <= '0;
    end else if (load) begin
      q <= din;
      v <= {DEPTH{load_valid}};
    end else if (en) begin
      for (int k = 0; k < DEPTH - 1; k++) q[k] <= q[k+1];
      v <= {1'b0, v[DEPTH-1:1]};
    end
  end

  assign dout       = q[0];
  assign dout_valid = v[0];

  // A load may replace at most the word being sent; anything behind it would be lost.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
                                 load |-> (v[DEPTH-1:1] == '0))
    else $error("piso_shift_reg: load while %0d words are still waiting", $countones(v) - 1);

endmodule
