// tb_booth_recoder: exhaustive check of the radix-4 Booth recoder against the digit value
// -2*b[2i+1] + b[2i] + b[2i-1].
module tb_booth_recoder;
  import dct_pkg::*;

  logic         b_hi, b_mid, b_lo;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_recoder dut (.b_hi(b_hi), .b_mid(b_mid), .b_lo(b_lo), .digit(digit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      int expv, got;
      {b_hi, b_mid, b_lo} = 3'(k);
      #1;
      expv = -2 * int'(b_hi) + int'(b_mid) + int'(b_lo);
      got  = (digit.two ? 2 : 0) + (digit.one ? 1 : 0);
      if (digit.neg) got = -got;
      checks++;
      if (got != expv || (digit.one && digit.two) || (expv == 0 && digit.neg)) begin
        failures++;
        $display("FAIL bits=%03b digit=%p expected %0d", k[2:0], digit, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
