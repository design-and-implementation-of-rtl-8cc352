// End-to-end testbench for radix16_booth_top at its default size (16 x 16
// signed), with no parameter overrides.
//
// For each operand pair it checks the combinational product at once, then
// runs the iterative unit on the same operands and checks its product and
// its latency of N/4 clock edges from start to done. While the iterative
// unit is busy the operands are changed and the combinational product is
// checked on the new pair, and start is raised again, which must be
// ignored. The operand pairs are the worked examples (320 x 400 = 128000
// and 2 x 3), corner values and random pairs.
//
// Mechanism coverage, each of which must happen at least once: every
// radix-16 Booth digit value -8..+8 (counted over the multiplier's groups),
// a negative partial product in the top group, a start ignored while busy,
// and a start accepted in the cycle that done is raised.
module tb_radix16_booth_top;
  localparam int N       = 16;
  localparam int NG      = N / 4;
  localparam int LATENCY = N / 4;

  logic           clk = 1'b0, rst_n = 1'b0, seq_start = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic [2*N-1:0] product, seq_product;
  logic           seq_busy, seq_done;
  int checks = 0, failures = 0;

  int digit_seen [17];        // index digit + 8
  int top_neg_seen = 0;
  int ignored_start = 0;
  int back_to_back = 0;

  radix16_booth_top dut (
    .clk(clk), .rst_n(rst_n), .multiplicand(a), .multiplier(b),
    .product(product), .seq_start(seq_start), .seq_busy(seq_busy),
    .seq_done(seq_done), .seq_product(seq_product));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*N-1:0] ref_mul(logic [N-1:0] x, logic [N-1:0] y);
    return (2*N)'(longint'(signed'(x)) * longint'(signed'(y)));
  endfunction

  // Record the Booth digits of a multiplier, worked out from its bits.
  function automatic void count_digits(logic [N-1:0] y);
    logic [N:0] e = {y, 1'b0};
    for (int k = 0; k < NG; k++) begin
      int d = -8 * int'(e[4*k+4]) + 4 * int'(e[4*k+3]) + 2 * int'(e[4*k+2])
              + int'(e[4*k+1]) + int'(e[4*k]);
      digit_seen[d + 8]++;
      if (k == NG - 1 && d < 0) top_neg_seen++;
    end
  endfunction

  task automatic check_comb(logic [N-1:0] x, logic [N-1:0] y);
    a = x; b = y;
    #1;
    count_digits(y);
    checks++;
    if (product !== ref_mul(x, y)) begin
      failures++;
      if (failures < 20)
        $display("FAIL comb %0d * %0d -> %0d", signed'(x), signed'(y), signed'(product));
    end
  endtask

  // Combinational check, then an iterative multiply of the same pair.
  task automatic run(logic [N-1:0] x, logic [N-1:0] y, bit chain);
    logic [2*N-1:0] exp = ref_mul(x, y);
    int edges = 0;
    @(negedge clk);
    check_comb(x, y);
    if (!chain) seq_start = 1'b1;
    @(negedge clk);
    seq_start = 1'b0;
    // Disturb: new operands and a stray start while busy.
    check_comb(N'($urandom()), N'($urandom()));
    if (seq_busy) begin
      seq_start = 1'b1;
      ignored_start++;
    end
    while (!seq_done && edges < 100) begin
      @(negedge clk);
      seq_start = 1'b0;
      edges++;
    end
    checks++;
    if (edges != LATENCY) begin
      failures++;
      $display("FAIL latency %0d expected %0d", edges, LATENCY);
    end
    checks++;
    if (seq_product !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL seq %0d * %0d -> %0d", signed'(x), signed'(y), signed'(seq_product));
    end
  endtask

  initial begin
    automatic logic [N-1:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF,
                                           16'h8000, 16'h7FFF, 16'h8888};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(16'd320, 16'd400, 1'b0);
    checks++;
    if (seq_product != 32'd128000 || product == 32'd0) begin
      failures++;
      $display("FAIL 320 x 400 gave %0d", seq_product);
    end
    run(16'd2, 16'd3, 1'b0);
    foreach (corners[i])
      foreach (corners[j]) run(corners[i], corners[j], 1'b0);
    for (int i = 0; i < 2000; i++)
      run(N'($urandom()), N'($urandom()), 1'b0);
    // Start accepted in the cycle where done is high.
    for (int i = 0; i < 5; i++) begin
      automatic logic [N-1:0] x = N'($urandom()), y = N'($urandom());
      a = x; b = y; seq_start = 1'b1;     // seq_done is high here
      @(negedge clk);
      seq_start = 1'b0;
      checks++;
      if (!seq_busy) begin
        failures++;
        $display("FAIL start during done not accepted");
      end else back_to_back++;
      while (!seq_done) @(negedge clk);
      checks++;
      if (seq_product !== ref_mul(x, y)) begin
        failures++;
        $display("FAIL back-to-back product");
      end
    end
    // Coverage of the design's mechanisms.
    for (int d = -8; d <= 8; d++) begin
      checks++;
      if (digit_seen[d + 8] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never exercised", d);
      end
    end
    checks += 3;
    if (top_neg_seen == 0)  begin failures++; $display("FAIL no negative top digit"); end
    if (ignored_start == 0) begin failures++; $display("FAIL no start while busy"); end
    if (back_to_back == 0)  begin failures++; $display("FAIL no back-to-back start"); end
    $display("coverage: digits -8..+8 = %p, top-group negative %0d, ignored starts %0d, back-to-back %0d",
             digit_seen, top_neg_seen, ignored_start, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
