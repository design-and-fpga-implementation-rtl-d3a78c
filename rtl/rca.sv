// rca: W-bit ripple carry adder, one of the three partial-product adders of
// the ripple carry Vedic multiplier and the carry-propagating second stage of
// the carry save adder.
//
// A chain of W full adders; the carry of bit i is the carry-in of bit i+1,
// bit 0 starts from 0. There is no carry-in port, as none is used by the
// multipliers. cout is the carry out of the top bit.
//
// Interface: a, b are W-bit unsigned addends; sum = (a+b) mod 2^W; cout is
// bit W of a+b. Timing: combinational, W full-adder delays worst case.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.x(a[i]), .y(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[W];
endmodule
