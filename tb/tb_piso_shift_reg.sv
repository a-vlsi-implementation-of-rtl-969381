// tb_piso_shift_reg: parallel loads of 16 words come out one per enabled clock in order;
// a load on the clock of the last shift continues the stream without a gap; stalls hold the
// register; a load with load_valid low produces no valid words.
module tb_piso_shift_reg;
  import dct_pkg::*;

  logic  clk = 1'b0;
  logic  rst, en, load, load_valid;
  word_t din [16];
  word_t dout;
  logic  dout_valid;
  int checks = 0, failures = 0;
  word_t exp_q [$];

  piso_shift_reg #(.DEPTH(16)) dut (.clk(clk), .rst(rst), .en(en), .load(load),
                                    .load_valid(load_valid), .din(din), .dout(dout),
                                    .dout_valid(dout_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; load = 1'b0; load_valid = 1'b0;
    foreach (din[k]) din[k] = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (dout_valid) failures++;
    for (int n = 0; n < 40; n++) begin
      int cnt;
      // load
      load_valid = (n != 5);
      foreach (din[k]) din[k] = word_t'($urandom);
      if (load_valid) foreach (din[k]) exp_q.push_back(din[k]);
      load = 1'b1; en = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      cnt = 0;
      while (cnt < 16) begin
        en = ($urandom_range(0, 3) != 0) || (n % 2 == 0);
        checks++;
        if (load_valid) begin
          if (!dout_valid || dout !== exp_q[0]) begin
            failures++;
            if (failures < 10) $display("FAIL load %0d word %0d got %h/%b expected %h", n, cnt,
                                        dout, dout_valid, exp_q[0]);
          end
        end else if (dout_valid) failures++;
        if (en) begin
          if (load_valid) void'(exp_q.pop_front());
          cnt++;
        end
        if (cnt == 16) break;   // the last word shifts out on the next load
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
