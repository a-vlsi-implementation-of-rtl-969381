// tb_coef_rom: all 16 coefficient ROMs against the scaled cosine computed in real arithmetic.
module tb_coef_rom;
  import dct_pkg::*;
  import dct_ref_pkg::*;

  logic [3:0] addr;
  word_t      coef [16];
  int checks = 0, failures = 0;

  for (genvar u = 0; u < 16; u++) begin : g_rom
    coef_rom #(.U(u)) dut (.addr(addr), .coef(coef[u]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 16; j++) begin
      addr = 4'(j);
      #1;
      for (int u = 0; u < 16; u++) begin
        checks++;
        if (int'(coef[u]) != ref_coef(u, j)) begin
          failures++;
          $display("FAIL u=%0d j=%0d got %0d expected %0d", u, j, coef[u], ref_coef(u, j));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
