// tb_booth_mult_array: the carry-save outputs must add up to a*b + c modulo 2^32, for corner
// operands (including the worst-case timing pattern A = FFFF, B = 8001, C = 0) and random ones.
// A 4 x 4 -> 8-bit instance of the same array is checked exhaustively.
module tb_booth_mult_array;
  import dct_pkg::*;

  word_t a, b;
  acc_t  c;
  logic [31:0] s, cy;
  int checks = 0, failures = 0;

  booth_mult_array dut (.a(a), .b(b), .c(c), .sum(s), .carry(cy));

  logic signed [3:0] a4, b4;
  logic signed [7:0] c4;
  logic        [7:0] s4, cy4;

  booth_mult_array #(.A_W(4), .B_W(4), .P_W(8)) dut4 (.a(a4), .b(b4), .c(c4), .sum(s4),
                                                     .carry(cy4));

  task automatic check();
    logic [31:0] expv, got;
    #1;
    expv = 32'(longint'(a) * longint'(b) + longint'(c));
    got  = s + cy;
    checks++;
    if (got !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h c=%h got %h expected %h", a, b, c, got, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h8001,
                          16'h5555, 16'hAAAA};
    a = 16'hFFFF; b = 16'h8001; c = '0; check();
    foreach (corner[i]) foreach (corner[j]) begin
      a = corner[i]; b = corner[j]; c = '0;          check();
      c = 32'h7FFF_FFFF;                             check();
      c = 32'h8000_0000;                             check();
    end
    for (int n = 0; n < 20000; n++) begin
      a = word_t'($urandom); b = word_t'($urandom); c = acc_t'($urandom);
      check();
    end
    for (int k = 0; k < 65536; k++) begin
      logic [7:0] e4;
      {a4, b4, c4} = 16'(k);
      #1;
      e4 = 8'(int'(a4) * int'(b4) + int'(c4));
      checks++;
      if (8'(s4 + cy4) !== e4) begin
        failures++;
        if (failures < 10) $display("FAIL 4x4 a=%0d b=%0d c=%0d got %h expected %h", a4, b4, c4,
                                    8'(s4 + cy4), e4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
