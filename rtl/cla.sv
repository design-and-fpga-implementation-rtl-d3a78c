// cla: W-bit carry look-ahead adder, the partial-product adder of the
// look-ahead Vedic multiplier.
//
// Each bit forms generate g = a&b and propagate p = a^b. Every carry is then
// computed directly from the g and p below it, without waiting for a ripple:
//   c[i+1] = g[i] | p[i]g[i-1] | p[i]p[i-1]g[i-2] | ... | p[i]..p[1]g[0]
// and sum = p ^ c. The look-ahead is a single level across the full width;
// the reference design only names the adder, so this textbook form and the
// absence of a carry-in port are this design's choices.
//
// Interface: a, b are W-bit unsigned addends; sum = (a+b) mod 2^W; cout is
// bit W of a+b. Timing: combinational, two logic levels for every carry.
module cla #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g    = a & b;
  assign p    = a ^ b;
  assign c[0] = 1'b0;

  // carry into bit i+1: generate at some bit j <= i, propagated through
  // bits j+1..i; each carry depends only on g and p, not on c[i]
  for (genvar i = 0; i < W; i++) begin : g_carry
    logic ci;
    always_comb begin
      logic run;                       // AND of p[i] .. p[j+1]
      run = 1'b1;
      ci  = 1'b0;
      for (int j = i; j >= 0; j--) begin
        ci  = ci | (run & g[j]);
        run = run & p[j];
      end
    end
    assign c[i+1] = ci;
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
