// Combinational N x N signed radix-16 Booth multiplier.
//
// The multiplier b is cut into N/4 overlapping 5-bit groups
// {b[4k+3:4k], b[4k-1]} (b[-1] = 0). Each group is encoded into a Booth
// digit -8..+8, and each digit selects a partial product digit*a, so only
// N/4 partial products are needed instead of N. Partial product k carries
// weight 16^k. The partial products are summed by a chain of ripple carry
// adders: adder k adds partial product k, sign-extended, to bits
// [2N-1:4k] of the running sum, with the partial product's negation bit
// as carry-in (completing its two's complement); the running sum's bits
// below 4k pass through unchanged since the shifted partial product is
// zero there. The result is the 2N-bit signed product.
//
// No clock: the delay is that of the encoder, the partial-product
// generator and the adder chain. N must be a multiple of 4. N = 16 is the
// operand size the design targets; the adder chain arrangement is this
// design's choice.
module radix16_booth_mult
  import booth16_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic [2*N-1:0] product
);

  localparam int unsigned NG = num_groups(N);
  localparam int unsigned PW = N + 4;
  localparam int unsigned RW = 2 * N;

  if (N % 4 != 0 || N < 8) begin : g_bad_n
    $error("radix16_booth_mult: N must be a multiple of 4 and at least 8");
  end

  logic [N:0] ext_mult;  // multiplier with the implied 0 below its LSB
  assign ext_mult = {multiplier, 1'b0};

  booth_digit_t         digit [NG];
  logic [PW-1:0]        pp    [NG];
  logic                 neg   [NG];
  logic [RW-1:0]        acc   [NG+1];

  assign acc[0] = '0;

  for (genvar k = 0; k < NG; k++) begin : g_row
    localparam int unsigned SH = 4 * k;   // weight of this row
    localparam int unsigned AW = RW - SH; // width of this row's adder

    logic [AW-1:0] pp_ext;
    logic          unused_cout;

    booth16_encoder u_enc (
      .grp  (ext_mult[SH+4:SH]),
      .digit(digit[k])
    );

    booth16_ppgen #(.N(N)) u_pp (
      .y    (multiplicand),
      .digit(digit[k]),
      .pp   (pp[k]),
      .neg  (neg[k])
    );

    // Sign-extend the partial product to the adder's width.
    assign pp_ext = AW'(signed'(pp[k]));

    ripple_carry_adder #(.W(AW)) u_add (
      .a   (acc[k][RW-1:SH]),
      .b   (pp_ext),
      .cin (neg[k]),
      .sum (acc[k+1][RW-1:SH]),
      .cout(unused_cout)
    );

    if (SH > 0) begin : g_low
      assign acc[k+1][SH-1:0] = acc[k][SH-1:0];
    end
  end

  assign product = acc[NG];

endmodule
