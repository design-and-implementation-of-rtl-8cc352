// Radix-16 Booth encoder.
//
// Takes one 5-bit group of the multiplier, {y[4k+3], y[4k+2], y[4k+1],
// y[4k], y[4k-1]}, with y[-1] = 0 for the lowest group, and returns the
// Booth digit -8*y[4k+3] + 4*y[4k+2] + 2*y[4k+1] + y[4k] + y[4k-1] as a
// sign flag and a magnitude 0..8. The mapping is the 32-entry table of
// the radix-16 Booth code (each non-zero magnitude is reached by two
// neighbouring codes, +8 and -8 by one each). Zero digits are given
// neg = 0, a choice of this design. Purely combinational.
module booth16_encoder
  import booth16_pkg::*;
(
  input  logic [4:0]   grp,
  output booth_digit_t digit
);

  always_comb begin
    unique case (grp)
      5'b00000, 5'b11111: digit = '{neg: 1'b0, mag: 4'd0};
      5'b00001, 5'b00010: digit = '{neg: 1'b0, mag: 4'd1};
      5'b00011, 5'b00100: digit = '{neg: 1'b0, mag: 4'd2};
      5'b00101, 5'b00110: digit = '{neg: 1'b0, mag: 4'd3};
      5'b00111, 5'b01000: digit = '{neg: 1'b0, mag: 4'd4};
      5'b01001, 5'b01010: digit = '{neg: 1'b0, mag: 4'd5};
      5'b01011, 5'b01100: digit = '{neg: 1'b0, mag: 4'd6};
      5'b01101, 5'b01110: digit = '{neg: 1'b0, mag: 4'd7};
      5'b01111:           digit = '{neg: 1'b0, mag: 4'd8};
      5'b10000:           digit = '{neg: 1'b1, mag: 4'd8};
      5'b10001, 5'b10010: digit = '{neg: 1'b1, mag: 4'd7};
      5'b10011, 5'b10100: digit = '{neg: 1'b1, mag: 4'd6};
      5'b10101, 5'b10110: digit = '{neg: 1'b1, mag: 4'd5};
      5'b10111, 5'b11000: digit = '{neg: 1'b1, mag: 4'd4};
      5'b11001, 5'b11010: digit = '{neg: 1'b1, mag: 4'd3};
      5'b11011, 5'b11100: digit = '{neg: 1'b1, mag: 4'd2};
      default:            digit = '{neg: 1'b1, mag: 4'd1};  // 11101, 11110
    endcase
  end

endmodule
