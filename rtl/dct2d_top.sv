// dct2d_top: real-time two-dimensional DCT of 16 x 16 image blocks.
//
// Pixels enter one word per clock, row by row, block after block. The row MAC set computes
// the 16-point DCT of each image row in 16 clocks and writes the 16 results as one line of
// the transposition memory. While the next block streams into the row set, the column MAC
// set reads the stored block one word per clock down its columns (row-DCT frequency p, image
// rows r = 0..15), and after each 16 words hands its 16 results to the output shift register,
// which sends them out one word per clock. The chip so takes one block per 256 clocks at
// each end.
//
// Interface
//   in_valid / in_data  : one pixel per clock when in_valid is high. A low in_valid stalls
//                         the whole pipeline (all state holds), so the stream may pause.
//                         The first pixel after reset is pixel (0,0) of a block.
//   out_valid / out_data: one coefficient per clock with out_valid high. Within a block the
//                         order is column by column: for p = 0..15, for q = 0..15 the word is
//                         Y(q,p), q the vertical (column-DCT) and p the horizontal (row-DCT)
//                         frequency. out_sob marks Y(0,0), the first word of a block.
// Timing: the first word of block k leaves on the clock edge at which the 274th pixel after
// the first pixel of block k is accepted (the stall-free latency is 274 clocks, then out_valid
// is high on every accepted clock).
// Number format: in_data is a signed integer; a result carries 4 fraction bits, out_data =
// 16 * Y, with Y = (4 m(u) m(v) / N^2) * sum a cos cos as in the 2D DCT definition. Row
// results are truncated to 16 bits (3 fraction bits) before the transposition memory, column
// results to 16 bits (4 fraction bits) at the output. With inputs in -256..255 nothing
// overflows. Block size, word widths, the two MAC sets, the memory and the shift register
// follow the design; the stall input, the number scaling and the output order are this
// design's own choices. The control counters are part of this module.
module dct2d_top
  import dct_pkg::*;
#(
  parameter int unsigned ROW_SHIFT = 15,  // row result -> memory word: acc >>> ROW_SHIFT, low 16 bits
  parameter int unsigned COL_SHIFT = 17   // column result -> output word: acc >>> COL_SHIFT, low 16 bits
) (
  input  logic  clk,
  input  logic  rst,        // synchronous, active high
  input  logic  in_valid,
  input  word_t in_data,
  output logic  out_valid,
  output word_t out_data,
  output logic  out_sob     // start of block: this word is Y(0,0)
);

  // ---------------------------------------------------------------- control counters
  logic [7:0] pix_cnt;      // position of the incoming pixel in its block: {row, column}
  logic       wr_orient;    // orientation of the block now being written
  logic       blk_stored;   // a complete block sits in the transposition memory
  logic [7:0] out_cnt;      // position of the next output word in its block

  always_ff @(posedge clk) begin
    if (rst) begin
      pix_cnt    <= '0;
      wr_orient  <= 1'b0;
      blk_stored <= 1'b0;
    end else if (in_valid) begin
      pix_cnt <= pix_cnt + 8'd1;
      if (pix_cnt == 8'hFF) begin
        wr_orient  <= ~wr_orient;
        blk_stored <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- row MAC set
  acc_t  row_next [16];
  acc_t  row_acc  [16];
  word_t row_word [16];

  mac_set u_row_set (
    .clk    (clk),
    .rst    (rst),
    .en     (in_valid),
    .clr    (pix_cnt[3:0] == 4'd0),
    .idx    (pix_cnt[3:0]),
    .data   (in_data),
    .c_next (row_next),
    .acc    (row_acc)
  );

  for (genvar u = 0; u < 16; u++) begin : g_row_word
    assign row_word[u] = word_t'(row_next[u] >>> ROW_SHIFT);
  end

  // ---------------------------------------------------------------- transposition memory
  word_t mem_rd;

  transpose_mem u_tmem (
    .clk       (clk),
    .we        (in_valid && pix_cnt[3:0] == 4'd15),
    .wr_orient (wr_orient),
    .wr_line   (pix_cnt[7:4]),
    .wr_data   (row_word),
    .rd_orient (~wr_orient),
    .rd_row    (pix_cnt[3:0]),
    .rd_col    (pix_cnt[7:4]),
    .rd_data   (mem_rd)
  );

  // read register: the word the column set uses on the next accepted clock
  word_t      col_data;
  logic [3:0] col_idx;
  logic       col_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      col_data  <= '0;
      col_idx   <= '0;
      col_valid <= 1'b0;
    end else if (in_valid) begin
      col_data  <= mem_rd;
      col_idx   <= pix_cnt[3:0];
      col_valid <= blk_stored;
    end
  end

  // ---------------------------------------------------------------- column MAC set
  acc_t  col_next [16];
  acc_t  col_acc  [16];
  word_t col_word [16];

  mac_set u_col_set (
    .clk    (clk),
    .rst    (rst),
    .en     (in_valid),
    .clr    (col_idx == 4'd0),
    .idx    (col_idx),
    .data   (col_data),
    .c_next (col_next),
    .acc    (col_acc)
  );

  for (genvar q = 0; q < 16; q++) begin : g_col_word
    assign col_word[q] = word_t'(col_next[q] >>> COL_SHIFT);
  end

  // ---------------------------------------------------------------- output shift register
  word_t sr_out;
  logic  sr_valid;

  piso_shift_reg #(.DEPTH(16)) u_out_sr (
    .clk        (clk),
    .rst        (rst),
    .en         (in_valid),
    .load       (in_valid && col_idx == 4'd15),
    .load_valid (col_valid),
    .din        (col_word),
    .dout       (sr_out),
    .dout_valid (sr_valid)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sob   <= 1'b0;
      out_cnt   <= '0;
    end else begin
      out_valid <= in_valid && sr_valid;
      out_sob   <= in_valid && sr_valid && out_cnt == 8'd0;
      out_data  <= sr_out;
      if (in_valid && sr_valid) out_cnt <= out_cnt + 8'd1;
    end
  end

endmodule
