// tb_transpose_mem: the transposition memory in the way the chip uses it. Blocks of 16 lines
// are written with alternating orientation while the previous block is read column by column
// (one word per clock, the write of line p landing on the clock its column p is last read).
// Every word read must be the one written at the same row and column of the previous block.
module tb_transpose_mem;
  import dct_pkg::*;

  logic       clk = 1'b0;
  logic       we, wr_orient, rd_orient;
  logic [3:0] wr_line, rd_row, rd_col;
  word_t      wr_data [16];
  word_t      rd_data;
  int checks = 0, failures = 0;

  transpose_mem dut (.clk(clk), .we(we), .wr_orient(wr_orient), .wr_line(wr_line),
                     .wr_data(wr_data), .rd_orient(rd_orient), .rd_row(rd_row),
                     .rd_col(rd_col), .rd_data(rd_data));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t blk [2][16][16];     // [parity][row][col]
    we = 1'b0; wr_orient = 1'b0; rd_orient = 1'b1; wr_line = '0; rd_row = '0; rd_col = '0;
    foreach (wr_data[e]) wr_data[e] = '0;
    for (int b = 0; b < 6; b++) begin
      foreach (blk[b%2][r, c]) blk[b%2][r][c] = word_t'($urandom);
      for (int t = 0; t < 256; t++) begin
        // read previous block: column p = t/16, row r = t%16
        rd_orient = ~wr_orient;
        rd_col = 4'(t / 16);
        rd_row = 4'(t % 16);
        // write row t/16 of this block on its last clock
        we = (t % 16 == 15);
        wr_line = 4'(t / 16);
        for (int e = 0; e < 16; e++) wr_data[e] = blk[b%2][t/16][e];
        #1;
        if (b > 0) begin
          checks++;
          if (rd_data !== blk[(b+1)%2][t%16][t/16]) begin
            failures++;
            if (failures < 10) $display("FAIL blk %0d r=%0d p=%0d got %h expected %h", b - 1,
                                        t % 16, t / 16, rd_data, blk[(b+1)%2][t%16][t/16]);
          end
        end
        @(posedge clk); #1;
      end
      wr_orient = ~wr_orient;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
