// full_adder: one-bit full adder, the cell of the ripple carry adder and of
// the reduction row of the carry save adder.
//
// Adds three bits of equal weight and returns a sum bit of that weight and a
// carry bit of twice the weight. Purely combinational; no clock.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = x ^ y ^ cin;
    cout = (x & y) | (cin & (x ^ y));
  end
endmodule
