// csa: W-bit carry save adder, adding three W-bit numbers at once.
//
// Stage 1 is a row of W full adders, one per bit position, that reduces
// (x_i, y_i, z_i) to a sum bit s_i and a carry bit k_i without passing any
// carry sideways. Stage 2 is a W-bit ripple carry adder that adds the carry
// vector k[W-1:0] to the sum vector shifted down by one, {0, s[W-1:1]}. Bit 0
// of the result is s_0 directly; the ripple adder gives bits 1..W and its
// carry out is bit W+1. This is the reference design's 4-bit carry save
// adder (inputs A, B, C; outputs S0..S4 and Cout) at any width.
//
// Interface: x, y, z are W-bit unsigned addends; sum = x+y+z exactly, W+2
// bits. Timing: combinational, one full adder plus a W-bit ripple.
module csa #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W+1:0] sum
);
  logic [W-1:0] s;   // stage-1 sums, weight 2^i
  logic [W-1:0] k;   // stage-1 carries, weight 2^(i+1)
  logic [W-1:0] rsum;
  logic         rcout;

  for (genvar i = 0; i < W; i++) begin : g_row
    full_adder u_fa (.x(x[i]), .y(y[i]), .cin(z[i]), .sum(s[i]), .cout(k[i]));
  end

  // carry propagation: bit i of this adder has weight 2^(i+1)
  rca #(.W(W)) u_rca (
    .a   (k),
    .b   ({1'b0, s[W-1:1]}),
    .sum (rsum),
    .cout(rcout)
  );

  assign sum = {rcout, rsum, s[0]};
endmodule
