// mac_set: one set of 16 multiply-accumulate cells, each with its coefficient ROM.
//
// All 16 MACs receive the same data word each enabled clock; MAC u multiplies it by
// b(u, idx) from its own ROM and accumulates. After the 16 words of one row (or column),
// idx = 0..15, MAC u holds output u of the one-dimensional DCT of those 16 words. `clr` is
// given with the first word (idx = 0) and starts new inner products; on the clock of the
// last word `c_next` carries all 16 finished results, while `acc` holds them one clock
// later. The chip has two such sets, one for rows and one for columns. One word per clock,
// a full 16-point transform every 16 clocks, as in the design; that `clr` equals idx = 0 and
// the result is taken from `c_next` are this design's own choices.
module mac_set
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic       clr,          // first word of a 16-word sequence
  input  logic [3:0] idx,          // position of the word in its sequence
  input  word_t      data,
  output acc_t       c_next [N],   // results if this is the last word
  output acc_t       acc    [N]
);

  for (genvar u = 0; u < N; u++) begin : g_mac
    word_t coef;

    coef_rom #(.U(u)) u_rom (
      .addr (idx),
      .coef (coef)
    );

    booth_mac u_mac (
      .clk    (clk),
      .rst    (rst),
      .en     (en),
      .clr    (clr),
      .a      (data),
      .b      (coef),
      .c_next (c_next[u]),
      .acc    (acc[u])
    );
  end

endmodule
