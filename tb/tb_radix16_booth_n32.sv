// Workload testbench: 32 x 32 signed multiplication, the operand size the
// design's introduction names, with both multiplier forms built at N = 32.
// Random operands and corner values; the combinational product and the
// iterative product (8 cycles per multiplication) are both compared with a
// 64-bit signed multiply.
module tb_radix16_booth_n32;
  localparam int N       = 32;
  localparam int LATENCY = N / 4;

  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic [2*N-1:0] product, seq_product;
  logic           busy, done;
  int checks = 0, failures = 0;

  radix16_booth_top #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .multiplicand(a), .multiplier(b),
    .product(product), .seq_start(start), .seq_busy(busy),
    .seq_done(done), .seq_product(seq_product));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [N-1:0] x, logic [N-1:0] y);
    logic [2*N-1:0] exp = (2*N)'(longint'(signed'(x)) * longint'(signed'(y)));
    int edges = 0;
    @(negedge clk);
    a = x; b = y; start = 1'b1;
    #1;
    checks++;
    if (product !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL comb %0d * %0d -> %0d", signed'(x), signed'(y), signed'(product));
    end
    @(negedge clk);
    start = 1'b0;
    while (!done && edges < 100) begin
      @(negedge clk);
      edges++;
    end
    checks++;
    if (edges != LATENCY || seq_product !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL seq %0d * %0d -> %0d after %0d cycles",
                 signed'(x), signed'(y), signed'(seq_product), edges);
    end
  endtask

  initial begin
    automatic logic [N-1:0] corners [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF,
                                           32'h8000_0000, 32'h7FFF_FFFF};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (corners[i])
      foreach (corners[j]) run(corners[i], corners[j]);
    for (int i = 0; i < 3000; i++) run($urandom(), $urandom());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
