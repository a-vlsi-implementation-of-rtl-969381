// tb_booth_mac: multiply-accumulate cell. Runs 16-term inner products (clr on the first
// term), stalls the enable at random, and checks after every clock that the accumulator
// equals the running sum of products modulo 2^32 (one MAC per enabled clock); it also applies
// the worst-case timing pattern A = FFFF, B = 8001, C = 0.
module tb_booth_mac;
  import dct_pkg::*;

  logic  clk = 1'b0;
  logic  rst, en, clr;
  word_t a, b;
  acc_t  c_next, acc;
  int checks = 0, failures = 0;
  longint model;

  booth_mac dut (.clk(clk), .rst(rst), .en(en), .clr(clr), .a(a), .b(b),
                 .c_next(c_next), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic cl, input word_t av, input word_t bv);
    logic [31:0] expv;
    en = e; clr = cl; a = av; b = bv;
    #1;
    expv = 32'((cl ? 64'sd0 : model) + longint'(av) * longint'(bv));
    checks++;
    if (c_next !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL c_next %h expected %h", c_next, expv);
    end
    @(posedge clk);
    if (e) model = longint'(signed'(expv));
    #1;
    checks++;
    if (acc !== 32'(model)) begin
      failures++;
      if (failures < 10) $display("FAIL acc %h expected %h", acc, 32'(model));
    end
  endtask

  initial begin
    rst = 1'b1; en = 1'b0; clr = 1'b0; a = '0; b = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    model = 0;
    checks++;
    if (acc !== '0) failures++;
    // worst-case pattern, a single product with C = 0
    step(1'b1, 1'b1, 16'hFFFF, 16'h8001);
    // inner products of 16 terms
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 16; i++) begin
        if ($urandom_range(0, 3) == 0) step(1'b0, i == 0, word_t'($urandom), word_t'($urandom));
        step(1'b1, i == 0, word_t'($urandom), word_t'($urandom));
      end
    end
    // extreme operands accumulate with wrap-around
    for (int i = 0; i < 16; i++) step(1'b1, i == 0, 16'h8000, 16'h8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
