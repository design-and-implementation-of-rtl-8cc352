// Self-checking testbench for radix16_booth_mult.
//
// The default 16-bit instance is checked on the worked examples (320 x 400
// = 128000, 2 x 3 = 6), on corner operands (0, +-1, the most negative and
// most positive values, in all pairings) and on random operands. A second,
// 8-bit instance is checked exhaustively over all 65536 operand pairs.
// Expected products are computed with the simulator's own signed multiply.
module tb_radix16_booth_mult;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  radix16_booth_mult dut16 (.multiplicand(a16), .multiplier(b16), .product(p16));
  radix16_booth_mult #(.N(8)) dut8 (.multiplicand(a8), .multiplier(b8), .product(p8));

  task automatic check16();
    logic [31:0] exp;
    #1;
    exp = 32'(longint'(signed'(a16)) * longint'(signed'(b16)));
    checks++;
    if (p16 !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL 16b %0d * %0d -> %0d expected %0d",
                 signed'(a16), signed'(b16), signed'(p16), signed'(exp));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [15:0] corners [7] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                                 16'h7FFF, 16'h0888, 16'hF777};
    a16 = 16'd320; b16 = 16'd400; check16();
    if (p16 != 32'd128000) begin
      failures++;
      $display("FAIL 320 x 400 gave %0d", p16);
    end
    a16 = 16'd2; b16 = 16'd3; check16();
    foreach (corners[i])
      foreach (corners[j]) begin
        a16 = corners[i]; b16 = corners[j]; check16();
      end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom()); b16 = 16'($urandom()); check16();
    end
    for (int i = 0; i < 65536; i++) begin
      logic [15:0] exp;
      {a8, b8} = 16'(i);
      #1;
      exp = 16'(int'(signed'(a8)) * int'(signed'(b8)));
      checks++;
      if (p8 !== exp) begin
        failures++;
        if (failures < 20)
          $display("FAIL 8b %0d * %0d -> %0d expected %0d",
                   signed'(a8), signed'(b8), signed'(p8), signed'(exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
