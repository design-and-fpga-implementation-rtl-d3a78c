// vedic_mult_rca: NxN unsigned Vedic multiplier whose partial products are
// summed by three N-bit ripple carry adders.
//
// Both operands are split into halves of H = N/2 bits. Four HxH Vedic
// multipliers give the N-bit partial products
//   q0 = a_lo*b_lo   q1 = a_lo*b_hi   q2 = a_hi*b_lo   q3 = a_hi*b_hi
// (the "vertical" outer pair and the "crosswise" middle pair). Then:
//   adder 1:  q2 + q1                        -> s1, carry ca1
//   adder 2:  s1 + q0[N-1:H]                 -> s2, carry ca2
//   adder 3:  q3 + {ca1|ca2, s2[N-1:H]}      -> s3
//   p = {s3, s2[H-1:0], q0[H-1:0]}
// ca1 and ca2 both have weight 2^(N+H) and are never 1 together (if q1+q2
// overflows, its low N bits are at most 2^H-2 and adding q0's upper half,
// at most 2^H-2, cannot overflow again), so an OR merges them; an assertion
// watches this. The carry out of adder 3 is always 0.
//
// For N=4 this is the reference 4x4 ripple carry architecture; the leaf cell
// is vedic2x2. Larger N (powers of two) recurse on this same architecture,
// an extension the reference applies only to other architectures.
//
// Interface: a, b are N-bit unsigned; p = a*b, 2N bits.
// Timing: purely combinational; no clock, no registers.
module vedic_mult_rca #(
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
    vedic_mult_rca #(.N(H)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
    vedic_mult_rca #(.N(H)) u_q1 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q1));
    vedic_mult_rca #(.N(H)) u_q2 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q2));
    vedic_mult_rca #(.N(H)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));
  end

  logic [N-1:0] s1, s2, s3, q0_hi, mid_hi;
  logic         ca1, ca2, ca3;

  always_comb begin
    q0_hi          = '0;
    q0_hi[H-1:0]   = q0[N-1:H];
    mid_hi         = '0;
    mid_hi[H-1:0]  = s2[N-1:H];
    mid_hi[H]      = ca1 | ca2;
  end

  rca #(.W(N)) u_add1 (.a(q2), .b(q1),     .sum(s1), .cout(ca1));
  rca #(.W(N)) u_add2 (.a(s1), .b(q0_hi),  .sum(s2), .cout(ca2));
  rca #(.W(N)) u_add3 (.a(q3), .b(mid_hi), .sum(s3), .cout(ca3));

  assign p = {s3, s2[H-1:0], q0[H-1:0]};

  always_comb begin
    assert (!(ca1 && ca2)) else $error("vedic_mult_rca: ca1 and ca2 both set");
    assert (!ca3)          else $error("vedic_mult_rca: final adder overflow");
  end

  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0)
      else $fatal(1, "vedic_mult_rca: N must be a power of two, at least 4");
  end
endmodule
