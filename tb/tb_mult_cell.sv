// tb_mult_cell: exhaustive check of the multiplier cell (full-adder and half-adder forms)
// for all five Booth digits and all data, sum-in and carry-in values.
module tb_mult_cell;
  import dct_pkg::*;

  booth_digit_t digit;
  logic a, am1, si, ci;
  logic so_f, co_f, so_h, co_h;
  int checks = 0, failures = 0;

  mult_cell #(.HALF_ADDER(1'b0)) dut_f (.digit(digit), .a(a), .am1(am1), .si(si), .ci(ci),
                                       .so(so_f), .co(co_f));
  mult_cell #(.HALF_ADDER(1'b1)) dut_h (.digit(digit), .a(a), .am1(am1), .si(si), .ci(ci),
                                       .so(so_h), .co(co_h));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -2; d <= 2; d++) begin
      digit.neg = (d < 0);
      digit.one = (d == 1 || d == -1);
      digit.two = (d == 2 || d == -2);
      for (int k = 0; k < 16; k++) begin
        int pp, tf, th;
        {a, am1, si, ci} = 4'(k);
        #1;
        // partial-product bit of d*A at this position, before the +1 of a negative digit
        pp = (d == 1 || d == -1) ? int'(a) : (d == 2 || d == -2) ? int'(am1) : 0;
        if (d < 0) pp = 1 - pp;
        tf = pp + int'(si) + int'(ci);
        th = pp + int'(si);
        checks++;
        if ({co_f, so_f} != 2'(tf)) begin
          failures++;
          $display("FAIL FA d=%0d a=%b am1=%b si=%b ci=%b -> %b%b", d, a, am1, si, ci, co_f, so_f);
        end
        checks++;
        if ({co_h, so_h} != 2'(th)) begin
          failures++;
          $display("FAIL HA d=%0d a=%b am1=%b si=%b -> %b%b", d, a, am1, si, co_h, so_h);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
