// Self-checking testbench for booth16_ppgen (N = 16): every digit -8..+8
// against corner multiplicands (0, 1, -1, most negative, most positive)
// and random ones. The partial product is pp sign-extended plus neg, and
// must equal digit * y.
module tb_booth16_ppgen;
  import booth16_pkg::*;
  localparam int N = 16;
  logic [N-1:0]   y;
  booth_digit_t   digit;
  logic [N+3:0]   pp;
  logic           neg;
  int checks = 0, failures = 0;

  booth16_ppgen #(.N(N)) dut (.y(y), .digit(digit), .pp(pp), .neg(neg));

  task automatic check(int d);
    longint exp, got;
    digit.neg = (d < 0);
    digit.mag = 4'(d < 0 ? -d : d);
    #1;
    exp = longint'(d) * longint'(signed'(y));
    got = longint'(signed'(pp)) + longint'(neg);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL y=%0d d=%0d -> pp=%h neg=%b (%0d) expected %0d",
               signed'(y), d, pp, neg, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [N-1:0] corners [5] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF};
    foreach (corners[i]) begin
      y = corners[i];
      for (int d = -8; d <= 8; d++) check(d);
    end
    for (int i = 0; i < 300; i++) begin
      y = N'($urandom());
      for (int d = -8; d <= 8; d++) check(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
