// coef_rom: the 256-bit coefficient ROM that sits beside each MAC.
//
// ROM number U holds the 16 scaled cosine coefficients that MAC U needs,
//   rom[j] = b(U, j) = round(2^15 * m(U) * cos((2j+1) U pi / 32)),  j = 0..15,
// i.e. one column of the coefficient matrix, 16 words of 16 bits (see dct_pkg for the
// scaling). The contents are fixed at elaboration from the parameter U. The read is
// asynchronous: `coef` follows `addr` in the same clock. What the ROM stores and its size
// follow the design; the fraction-bit scaling and the asynchronous read are this design's
// own choices.
module coef_rom
  import dct_pkg::*;
#(
  parameter int unsigned U = 1       // coefficient column (frequency index) 0..15
) (
  input  logic [3:0] addr,           // sample index j
  output word_t      coef
);

  typedef word_t rom_t [N];

  function automatic rom_t fill();
    rom_t r;
    for (int unsigned j = 0; j < N; j++) r[j] = dct_coef(U, j);
    return r;
  endfunction

  localparam rom_t ROM = fill();

  assign coef = ROM[addr];

endmodule
