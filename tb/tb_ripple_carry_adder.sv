// Self-checking testbench for ripple_carry_adder at its default width
// (32 bits): carry-chain corner cases (all ones plus one, alternating
// patterns) and random operands, compared with a + b + cin computed on
// 33 bits.
module tb_ripple_carry_adder;
  localparam int W = 32;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check();
    logic [W:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + (W+1)'(cin);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> %b_%h expected %h", a, b, cin, cout, sum, exp);
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
    a = '1; b = '0; cin = 1'b1; check();         // full-length ripple
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    a = 32'hAAAA_AAAA; b = 32'h5555_5555; cin = 1'b1; check();
    a = 32'h8000_0000; b = 32'h8000_0000; cin = 1'b0; check();
    for (int i = 0; i < 2000; i++) begin
      a = $urandom(); b = $urandom(); cin = 1'($urandom());
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
