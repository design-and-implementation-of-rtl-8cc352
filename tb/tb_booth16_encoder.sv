// Self-checking testbench for booth16_encoder: all 32 groups, compared
// with the digit value -8*g[4] + 4*g[3] + 2*g[2] + g[1] + g[0]. A zero
// digit must come with neg = 0.
module tb_booth16_encoder;
  import booth16_pkg::*;
  logic [4:0]   grp;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth16_encoder dut (.grp(grp), .digit(digit));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int exp, got;
      grp = 5'(i);
      #1;
      exp = -8 * int'(grp[4]) + 4 * int'(grp[3]) + 2 * int'(grp[2])
            + int'(grp[1]) + int'(grp[0]);
      got = digit.neg ? -int'(digit.mag) : int'(digit.mag);
      checks++;
      if (got != exp || (exp == 0 && digit.neg)) begin
        failures++;
        $display("FAIL grp=%b -> neg=%b mag=%0d expected %0d", grp, digit.neg, digit.mag, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
