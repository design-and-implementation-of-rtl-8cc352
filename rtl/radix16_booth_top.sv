// Radix-16 Booth multiplier, top level.
//
// Two forms of the same N x N signed radix-16 Booth multiplier, both built
// from the Booth encoder, the partial-product generator and ripple carry
// adders, share the operand inputs:
//   * radix16_booth_mult forms all N/4 partial products at once and sums
//     them with a chain of ripple carry adders; `product` follows the
//     operands combinationally.
//   * radix16_booth_seq retires one Booth digit per clock: `seq_start`
//     samples the operands, `seq_done` pulses N/4 cycles later with the
//     result on `seq_product`, `seq_busy` is high meanwhile.
// Reset is asynchronous and active low and only affects the iterative
// unit. Placing both forms side by side is this design's choice.
module radix16_booth_top #(
  parameter int unsigned N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [2*N-1:0] product,
  input  logic           seq_start,
  output logic           seq_busy,
  output logic           seq_done,
  output logic [2*N-1:0] seq_product
);

  radix16_booth_mult #(.N(N)) u_mult (
    .multiplicand(multiplicand),
    .multiplier  (multiplier),
    .product     (product)
  );

  radix16_booth_seq #(.N(N)) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (seq_start),
    .multiplicand(multiplicand),
    .multiplier  (multiplier),
    .busy        (seq_busy),
    .done        (seq_done),
    .product     (seq_product)
  );

endmodule
