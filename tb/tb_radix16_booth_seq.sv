// Self-checking testbench for radix16_booth_seq (N = 16).
//
// Runs the worked examples (320 x 400, 2 x 3), corner pairs and random
// operands. For each product it checks the value against a signed
// multiply, that done arrives exactly N/4 = 4 cycles after start, that
// busy is high for those cycles, and that the product holds after done.
// It also raises start while busy with other operands and checks that
// this is ignored, and starts again in the cycle right after done.
module tb_radix16_booth_seq;
  localparam int N       = 16;
  localparam int LATENCY = N / 4;

  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic           busy, done;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;

  radix16_booth_seq #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .multiplicand(a),
    .multiplier(b), .busy(busy), .done(done), .product(product));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One multiplication; if disturb is set, start is pulsed mid-way with
  // other operands, which must be ignored.
  task automatic run(logic [N-1:0] x, logic [N-1:0] y, bit disturb);
    logic [2*N-1:0] exp;
    int cycles;
    exp = (2*N)'(longint'(signed'(x)) * longint'(signed'(y)));
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    checks++;
    if (!busy) begin
      failures++;
      $display("FAIL busy not raised after start");
    end
    if (disturb) begin
      a = ~x; b = y + 1'b1; start = 1'b1;
    end
    while (!done && cycles < 100) begin
      @(negedge clk);
      start = 1'b0;
      cycles++;
    end
    // cycles counts negedges from the start-sampling edge to done; done
    // is raised LATENCY clock edges after the one that sampled start.
    checks++;
    if (cycles - 1 != LATENCY) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycles - 1, LATENCY);
    end
    checks++;
    if (product !== exp || busy) begin
      failures++;
      $display("FAIL %0d * %0d -> %0d expected %0d (busy=%b)",
               signed'(x), signed'(y), signed'(product), signed'(exp), busy);
    end
    @(negedge clk);
    checks++;
    if (product !== exp || done) begin
      failures++;
      $display("FAIL product not held or done too long");
    end
  endtask

  initial begin
    automatic logic [N-1:0] corners [5] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy || done) begin
      failures++;
      $display("FAIL busy/done after reset");
    end
    run(16'd320, 16'd400, 1'b0);
    run(16'd2, 16'd3, 1'b1);
    foreach (corners[i])
      foreach (corners[j]) run(corners[i], corners[j], 1'b0);
    for (int i = 0; i < 3000; i++)
      run(N'($urandom()), N'($urandom()), 1'($urandom()));
    // Back-to-back: start in the cycle where done is high.
    @(negedge clk);
    a = 16'd1234; b = -16'sd77; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    a = 16'd999; b = 16'd999; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (!busy) begin
      failures++;
      $display("FAIL start during done not accepted");
    end
    while (!done) @(negedge clk);
    checks++;
    if (product !== 32'd998001) begin
      failures++;
      $display("FAIL back-to-back product %0d", product);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
