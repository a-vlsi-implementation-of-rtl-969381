// tb_cond_sum_adder: 32-bit conditional sum adder against the + operator, with carry-in and
// carry-out, for carry-chain corner cases and random operands; also an 8-bit instance.
module tb_cond_sum_adder;
  logic [31:0] x, y, s;
  logic        cin, cout;
  logic [7:0]  x8, y8, s8;
  logic        cout8;
  int checks = 0, failures = 0;

  cond_sum_adder #(.W(32)) dut   (.x(x), .y(y), .cin(cin), .sum(s), .cout(cout));
  cond_sum_adder #(.W(8))  dut8  (.x(x8), .y(y8), .cin(cin), .sum(s8), .cout(cout8));

  task automatic check();
    logic [32:0] e;
    logic [8:0]  e8;
    #1;
    e  = {1'b0, x} + {1'b0, y} + 33'(cin);
    e8 = {1'b0, x8} + {1'b0, y8} + 9'(cin);
    checks++;
    if ({cout, s} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %h, got %b %h", x, y, cin, e, cout, s);
    end
    checks++;
    if ({cout8, s8} !== e8) begin
      failures++;
      if (failures < 10) $display("FAIL8 %h + %h + %b = %h, got %b %h", x8, y8, cin, e8, cout8, s8);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      cin = c[0];
      x = '1;           y = '0;           x8 = '1;    y8 = '0;    check();
      x = '1;           y = 32'd1;        x8 = '1;    y8 = 8'd1;  check();
      x = 32'h8000_0000; y = 32'h8000_0000; x8 = 8'h80; y8 = 8'h80; check();
      for (int k = 0; k < 32; k++) begin
        x = (32'd1 << k) - 1; y = 32'd1; x8 = 8'((1 << (k % 8)) - 1); y8 = 8'd1; check();
      end
    end
    for (int n = 0; n < 20000; n++) begin
      x = $urandom; y = $urandom; cin = 1'($urandom);
      x8 = 8'($urandom); y8 = 8'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
