// vedic2x2: 2x2-bit multiplier after the Urdhva-Tiryakbhyam ("vertically and
// crosswise") rule. It is the leaf cell of every larger multiplier here.
//
// The four bit products are formed with AND. The vertical product of the two
// low bits is product bit 0. The two crosswise products a0b1 and a1b0 meet in
// a first half adder: its sum is bit 1 and its carry c1 goes to a second half
// adder together with the vertical product of the two high bits a1b1, whose
// sum and carry are bits 2 and 3:
//   s0 = a0b0;  {c1,s1} = a1b0 + a0b1;  {c2,s2} = c1 + a1b1;  p = {c2,s2,s1,s0}
// This structure follows the reference design exactly. Unsigned operands.
//
// Interface: a, b are 2-bit unsigned operands, p the 4-bit product.
// Timing: purely combinational, two half-adder levels after the AND gates.
module vedic2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a0b1, a1b0, a1b1;
  logic c1;

  always_comb begin
    a0b0 = a[0] & b[0];
    a0b1 = a[0] & b[1];
    a1b0 = a[1] & b[0];
    a1b1 = a[1] & b[1];
  end

  assign p[0] = a0b0;

  // crosswise step
  half_adder u_ha_cross (.x(a0b1), .y(a1b0), .sum(p[1]), .carry(c1));
  // vertical step on the high bits plus the crosswise carry
  half_adder u_ha_high  (.x(c1),   .y(a1b1), .sum(p[2]), .carry(p[3]));
endmodule
