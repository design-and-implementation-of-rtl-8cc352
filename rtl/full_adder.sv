// One-bit full adder, the cell of the ripple carry adder.
//
// Sum is the three-input XOR; carry-out is the majority of the inputs,
// written as generate (a & b) or propagate (a ^ b) with a carry-in, which
// is two levels of logic on the carry path. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic p;

  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (p & cin);
  end

endmodule
