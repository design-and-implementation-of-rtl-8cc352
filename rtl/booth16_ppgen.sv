// Radix-16 Booth partial-product generator.
//
// Given the signed N-bit multiplicand y and one Booth digit d (-8..+8),
// produces the partial product d*y on N+4 bits. The multiples 0, y, 2y, 4y
// and 8y are shifts of y; the "hard" multiples are formed with ripple carry
// adders: 3y = 2y + y, 5y = 4y + y, 7y = 8y + ~y + 1 (that is 8y - y), and
// 6y is 3y shifted left by one. A negative digit is made by the two's
// complement of the multiple. This block only inverts the bits and raises
// `neg`; the +1 is left to the adder that accumulates the partial product,
// which takes `neg` as its carry-in. So the true value is pp + neg, sign-
// extended from N+4 bits. Adding the +1 downstream, rather than in a
// separate incrementer, is a choice of this design.
//
// Purely combinational: three N+4-bit ripple adders in parallel, then a
// multiplexer and the conditional inversion.
module booth16_ppgen
  import booth16_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   y,
  input  booth_digit_t   digit,
  output logic [N+3:0]   pp,
  output logic           neg
);

  localparam int unsigned PW = N + 4;

  logic [PW-1:0] y1, y2, y4, y8, y3, y5, y7, y6;
  logic [PW-1:0] mult;
  logic          unused_c3, unused_c5, unused_c7;

  // Easy multiples: sign extension and shifts.
  assign y1 = PW'(signed'(y));
  assign y2 = y1 << 1;
  assign y4 = y1 << 2;
  assign y8 = y1 << 3;

  // Hard multiples with ripple carry adders.
  ripple_carry_adder #(.W(PW)) u_add3 (
    .a(y2), .b(y1), .cin(1'b0), .sum(y3), .cout(unused_c3));
  ripple_carry_adder #(.W(PW)) u_add5 (
    .a(y4), .b(y1), .cin(1'b0), .sum(y5), .cout(unused_c5));
  ripple_carry_adder #(.W(PW)) u_add7 (
    .a(y8), .b(~y1), .cin(1'b1), .sum(y7), .cout(unused_c7));

  assign y6 = y3 << 1;

  always_comb begin
    unique case (digit.mag)
      4'd0:    mult = '0;
      4'd1:    mult = y1;
      4'd2:    mult = y2;
      4'd3:    mult = y3;
      4'd4:    mult = y4;
      4'd5:    mult = y5;
      4'd6:    mult = y6;
      4'd7:    mult = y7;
      default: mult = y8;  // 8 (9..15 never produced by the encoder)
    endcase
    neg = digit.neg;
    pp  = digit.neg ? ~mult : mult;
  end

endmodule
