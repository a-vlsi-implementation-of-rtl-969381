// transpose_mem: 16 x 16-word transposition memory between the row and the column MAC sets.
//
// The row set delivers the 16 results of one image row at once; they are written as one
// line of the array. The column set reads one word per clock, walking down a column of the
// row results. A single 16 x 16 array serves both the block being read and the block being
// written by alternating the orientation from block to block: one block is stored as rows
// (wr_orient = 0, mem[line][e] = wr_data[e]) and the next as columns (wr_orient = 1,
// mem[e][line] = wr_data[e]). Read line p then always frees exactly the line the next write
// needs, so a line is overwritten on the clock it is last read and no second buffer is
// needed. The read is asynchronous: rd_data = X[rd_row][rd_col] of the stored block, where
// rd_orient is the orientation that block was written with. Writes happen on the clock edge
// when `we` is high. The 16 x 16 size and the transpose follow the design; the alternating
// orientation is this design's own way to run both MAC sets at full rate.
module transpose_mem
  import dct_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic       wr_orient,
  input  logic [3:0] wr_line,
  input  word_t      wr_data [16],
  input  logic       rd_orient,
  input  logic [3:0] rd_row,      // row of the stored block (image row)
  input  logic [3:0] rd_col,      // column of the stored block (row-DCT frequency)
  output word_t      rd_data
);

  word_t mem [16][16];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int e = 0; e < 16; e++) begin
        if (wr_orient) mem[e][wr_line] <= wr_data[e];
        else           mem[wr_line][e] <= wr_data[e];
      end
    end
  end

  assign rd_data = rd_orient ? mem[rd_col][rd_row] : mem[rd_row][rd_col];

endmodule
