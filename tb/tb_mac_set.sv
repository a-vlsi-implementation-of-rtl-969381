// tb_mac_set: one MAC set computes the 16-point DCT of 16-word sequences. Each sequence is
// fed one word per enabled clock with random stalls; on the last word c_next must equal
// sum_j x[j]*b(u,j) for all 16 outputs, and acc must hold it one clock later.
module tb_mac_set;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, en, clr;
  logic [3:0] idx;
  word_t      data;
  acc_t       c_next [16];
  acc_t       acc    [16];
  int checks = 0, failures = 0;

  mac_set dut (.clk(clk), .rst(rst), .en(en), .clr(clr), .idx(idx), .data(data),
               .c_next(c_next), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [16];
    longint expv [16];
    rst = 1'b1; en = 1'b0; clr = 1'b0; idx = '0; data = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 100; n++) begin
      for (int j = 0; j < 16; j++) x[j] = (n == 0) ? 255 : $urandom_range(0, 4095) - 2048;
      for (int u = 0; u < 16; u++) begin
        expv[u] = 0;
        for (int j = 0; j < 16; j++) expv[u] += longint'(x[j]) * ref_coef(u, j);
      end
      for (int j = 0; j < 16; j++) begin
        while ($urandom_range(0, 4) == 0) begin
          en = 1'b0; idx = 4'($urandom); clr = 1'($urandom); data = word_t'($urandom);
          @(posedge clk); #1;
        end
        en = 1'b1; clr = (j == 0); idx = 4'(j); data = word_t'(x[j]);
        #1;
        if (j == 15) begin
          for (int u = 0; u < 16; u++) begin
            checks++;
            if (c_next[u] !== 32'(expv[u])) begin
              failures++;
              if (failures < 10) $display("FAIL u=%0d got %0d expected %0d", u, c_next[u], expv[u]);
            end
          end
        end
        @(posedge clk); #1;
      end
      en = 1'b0;
      for (int u = 0; u < 16; u++) begin
        checks++;
        if (acc[u] !== 32'(expv[u])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
