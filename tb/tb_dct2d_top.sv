// tb_dct2d_top: end-to-end test of the 16x16 2D DCT with the top at its default parameters.
//
// Streams NBLK blocks of pixels (random values in -256..255 plus a flat block and a
// checkerboard at the range limits) into the chip, with random stalls of in_valid in some
// blocks and a stall-free run in others, then two blocks of zeros that push the last real
// block out (and are checked as far as they come out). Every output word is compared with
//   - a bit-exact integer model: row pass sum_c x[r][c] b(p,c), arithmetic shift right 15,
//     low 16 bits; column pass sum_r X[r][p] b(q,r), shift right 17, low 16 bits; output
//     order p = 0..15, q = 0..15 (coefficients computed from the cosine in real arithmetic);
//   - the exact 2D DCT in real arithmetic, within 1.0 after removing the 4 fraction bits.
// It checks the latency (first word of block k after 274 + 256 k accepted pixels, which also
// fixes the rate of one block per 256 clocks), out_sob on the first word of each block, and
// counts the mechanisms exercised: stalls, blocks stored in each memory orientation, and
// stall-free blocks.
module tb_dct2d_top;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  localparam int NBLK = 6;            // blocks with data; two more blocks of zeros follow
  localparam int TOT  = NBLK + 2;

  logic  clk = 1'b0;
  logic  rst, in_valid, out_valid, out_sob;
  word_t in_data, out_data;
  int checks = 0, failures = 0;

  dct2d_top dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data),
                 .out_valid(out_valid), .out_data(out_data), .out_sob(out_sob));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int    pix   [TOT][16][16];
  int    y_int [TOT][16][16];    // [blk][q][p]
  real   y_re  [TOT][16][16];

  // bit-exact model of the datapath
  task automatic model(input int b);
    int     x   [16][16];
    longint s;
    x = pix[b];
    for (int r = 0; r < 16; r++)
      for (int p = 0; p < 16; p++) begin
        s = 0;
        for (int c = 0; c < 16; c++) s += longint'(pix[b][r][c]) * ref_coef(p, c);
        x[r][p] = int'(word_t'(s >>> 15));
      end
    for (int p = 0; p < 16; p++)
      for (int q = 0; q < 16; q++) begin
        s = 0;
        for (int r = 0; r < 16; r++) s += longint'(x[r][p]) * ref_coef(q, r);
        y_int[b][q][p] = int'(word_t'(s >>> 17));
        y_re[b][q][p]  = dct2_real(pix[b], q, p);
      end
  endtask

  int accepted = 0;
  int n_stall = 0, n_out = 0, n_sob = 0;
  int n_blk_even = 0, n_blk_odd = 0, n_blk_nostall = 0;
  real max_err = 0.0;

  // output checker: runs just after every clock edge
  initial begin
    forever begin
      @(posedge clk); #2;
      if (!rst && out_valid) begin
        int b, k, p, q;
        real err;
        b = n_out / 256; k = n_out % 256; p = k / 16; q = k % 16;
        if (k == 0) begin
          checks++;
          if (accepted != 274 + 256 * b) begin
            failures++;
            $display("FAIL block %0d first word after %0d pixels, expected %0d", b, accepted,
                     274 + 256 * b);
          end
          if (b % 2 == 0) n_blk_even++; else n_blk_odd++;
        end
        checks++;
        if (out_sob !== (k == 0)) begin
          failures++;
          $display("FAIL out_sob=%b at block %0d word %0d", out_sob, b, k);
        end
        if (out_sob) n_sob++;
        if (b < TOT) begin
          checks++;
          if (int'(out_data) != y_int[b][q][p]) begin
            failures++;
            if (failures < 20) $display("FAIL block %0d Y(%0d,%0d) got %0d expected %0d", b, q, p,
                                        out_data, y_int[b][q][p]);
          end
          err = real'(out_data) / 16.0 - y_re[b][q][p];
          if (err < 0.0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > 1.0) begin
            failures++;
            if (failures < 20) $display("FAIL block %0d Y(%0d,%0d) = %f, exact %f", b, q, p,
                                        real'(out_data) / 16.0, y_re[b][q][p]);
          end
        end
        n_out++;
      end
    end
  end

  initial begin
    // test data
    for (int b = 0; b < TOT; b++)
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          if (b >= NBLK)  pix[b][r][c] = 0;
          else if (b == 1) pix[b][r][c] = 255;                               // flat block
          else if (b == 2) pix[b][r][c] = ((r + c) % 2 == 0) ? 255 : -256;   // checkerboard
          else            pix[b][r][c] = $urandom_range(0, 511) - 256;
        end
    for (int b = 0; b < TOT; b++) model(b);

    rst = 1'b1; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int b = 0; b < TOT; b++) begin
      bit stalls;
      stalls = (b % 3 == 1);
      if (!stalls) n_blk_nostall++;
      for (int t = 0; t < 256; t++) begin
        while (stalls && $urandom_range(0, 4) == 0) begin
          in_valid = 1'b0; in_data = word_t'($urandom);
          n_stall++;
          @(posedge clk); #1;
        end
        in_valid = 1'b1;
        in_data  = word_t'(pix[b][t/16][t%16]);
        @(posedge clk);
        accepted++;
        #1;
      end
    end
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    #3;

    // every data block must have come out in full
    checks++;
    if (n_out < 256 * NBLK) begin
      failures++;
      $display("FAIL only %0d output words", n_out);
    end
    // mechanisms
    checks++; if (n_stall == 0)       begin failures++; $display("FAIL no stall exercised"); end
    checks++; if (n_blk_even == 0)    begin failures++; $display("FAIL no row-stored block"); end
    checks++; if (n_blk_odd == 0)     begin failures++; $display("FAIL no column-stored block"); end
    checks++; if (n_blk_nostall == 0) begin failures++; $display("FAIL no stall-free block"); end
    checks++; if (n_sob != (n_out + 255) / 256) begin failures++; $display("FAIL %0d block starts", n_sob); end
    $display("outputs=%0d stalls=%0d row-stored blocks=%0d column-stored blocks=%0d max err=%f",
             n_out, n_stall, n_blk_even, n_blk_odd, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
