// vedic_mult_csa2: NxN unsigned Vedic multiplier whose partial products are
// summed by two N-bit carry save adders.
//
// As in the other architectures, four HxH Vedic multipliers (H = N/2) give
//   q0 = a_lo*b_lo   q1 = a_lo*b_hi   q2 = a_hi*b_lo   q3 = a_hi*b_hi.
// The middle column is one three-operand addition, which suits a carry save
// adder: csa A adds q2, q1 and the upper half of q0 in one step, giving the
// (N+2)-bit middle sum m. Its low H bits are product bits N-1..H. The rest
// of m, m[N+1:H], is added to q3 by csa B, whose third operand is 0; its low
// N bits are the upper half of the product:
//   m = q2 + q1 + q0[N-1:H]
//   p = {(q3 + m[N+1:H])[N-1:0], m[H-1:0], q0[H-1:0]}
// m reaches 2^(N+1) - 4 (for N=4: 20), so all of m[N+1:H] is passed on, not
// only m[N-1:H]; this is needed for a correct product (e.g. 15*15).
//
// For N=4 this is the reference two-carry-save-adder architecture. Larger N
// (powers of two) recurse on the same architecture, a choice of this design.
//
// Interface: a, b are N-bit unsigned; p = a*b, 2N bits.
// Timing: purely combinational; no clock, no registers.
module vedic_mult_csa2 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] q0, q1, q2, q3;

  if (H == 2) begin : g_leaf
    vedic2x2 u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
    vedic2x2 u_q1 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q1));
    vedic2x2 u_q2 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q2));
    vedic2x2 u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));
  end else begin : g_sub
    vedic_mult_csa2 #(.N(H)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
    vedic_mult_csa2 #(.N(H)) u_q1 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q1));
    vedic_mult_csa2 #(.N(H)) u_q2 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q2));
    vedic_mult_csa2 #(.N(H)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));
  end

  logic [N-1:0] q0_hi, m_hi;
  logic [N+1:0] m, t;

  always_comb begin
    q0_hi         = '0;
    q0_hi[H-1:0]  = q0[N-1:H];
    m_hi          = '0;
    m_hi[H+1:0]   = m[N+1:H];
  end

  csa #(.W(N)) u_csa_mid (.x(q2), .y(q1),   .z(q0_hi), .sum(m));
  csa #(.W(N)) u_csa_top (.x(q3), .y(m_hi), .z('0),    .sum(t));

  assign p = {t[N-1:0], m[H-1:0], q0[H-1:0]};

  always_comb begin
    assert (t[N+1:N] == 2'b00) else $error("vedic_mult_csa2: upper adder overflow");
  end

  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0)
      else $fatal(1, "vedic_mult_csa2: N must be a power of two, at least 4");
  end
endmodule
