// half_adder: one-bit half adder, the building cell of the 2x2 Vedic
// multiplier.
//
// sum is the exclusive OR of the two inputs and carry their AND.
// Purely combinational; no clock.
module half_adder (
  input  logic x,
  input  logic y,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = x ^ y;
    carry = x & y;
  end
endmodule
