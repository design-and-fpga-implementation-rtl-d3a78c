// vedic_mult_csa1: NxN unsigned Vedic multiplier that sums all its partial
// products with a single carry save adder of 3N/2 bits.
//
// Four HxH Vedic multipliers (H = N/2) give
//   q0 = a_lo*b_lo   q1 = a_lo*b_hi   q2 = a_hi*b_lo   q3 = a_hi*b_hi.
// q0 and q3 do not overlap once q3 is shifted up by N, so the upper half of
// q0 is simply appended below q3 (concatenation, no adder). That leaves
// three 3H-bit operands, which one carry save adder adds in one pass:
//   x = {q3, q0[N-1:H]}    y = {0, q2}    z = {0, q1}
//   p = {(x + y + z)[3H-1:0], q0[H-1:0]}
// The two top bits of the adder's (3H+2)-bit result are always 0 since
// x + y + z < 2^(2N-H); an assertion watches this.
//
// For N=4 this is the reference single-carry-save-adder architecture with a
// 6-bit adder. Larger N recurse on the same architecture, the way the
// reference builds its 8x8 and 32x32 versions.
//
// Interface: a, b are N-bit unsigned; p = a*b, 2N bits.
// Timing: purely combinational; no clock, no registers.
module vedic_mult_csa1 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;
  localparam int unsigned W = 3 * H;

  logic [N-1:0] q0, q1, q2, q3;

  if (H == 2) begin : g_leaf
    vedic2x2 u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
    vedic2x2 u_q1 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q1));
    vedic2x2 u_q2 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q2));
    vedic2x2 u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));
  end else begin : g_sub
    vedic_mult_csa1 #(.N(H)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
    vedic_mult_csa1 #(.N(H)) u_q1 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q1));
    vedic_mult_csa1 #(.N(H)) u_q2 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q2));
    vedic_mult_csa1 #(.N(H)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));
  end

  logic [W-1:0] x, y, z;
  logic [W+1:0] t;

  always_comb begin
    x = {q3, q0[N-1:H]};
    y = '0;
    y[N-1:0] = q2;
    z = '0;
    z[N-1:0] = q1;
  end

  csa #(.W(W)) u_csa (.x(x), .y(y), .z(z), .sum(t));

  assign p = {t[W-1:0], q0[H-1:0]};

  always_comb begin
    assert (t[W+1:W] == 2'b00) else $error("vedic_mult_csa1: adder overflow");
  end

  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0)
      else $fatal(1, "vedic_mult_csa1: N must be a power of two, at least 4");
  end
endmodule
