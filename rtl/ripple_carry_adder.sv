// W-bit ripple carry adder.
//
// W full adders in a chain: the carry-out of bit i is the carry-in of bit
// i+1, so the carry ripples from the least to the most significant bit and
// the delay grows linearly with W. sum = a + b + cin modulo 2^W and cout is
// the carry out of bit W-1. Purely combinational. The width is a parameter
// (default 32); each user sets its own.
module ripple_carry_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
