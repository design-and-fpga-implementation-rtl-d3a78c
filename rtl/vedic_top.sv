// vedic_top: every Vedic multiplier configuration side by side.
//
// The four 4x4 architectures (ripple carry, carry look-ahead, two carry save
// adders, one carry save adder) share the operand pair a4/b4 and each bring
// out their own 8-bit product, so they can be compared directly. The 8x8
// and 32x32 multipliers are built in the two architectures that are carried
// to those sizes, look-ahead and single carry save, each size with its own
// operand pair. All products are unsigned and exact.
//
// Timing: purely combinational; no clock, no registers. Any registering for
// a pipelined use is left to the surrounding design.
module vedic_top (
  input  logic [3:0]  a4,
  input  logic [3:0]  b4,
  output logic [7:0]  p4_rca,
  output logic [7:0]  p4_cla,
  output logic [7:0]  p4_csa2,
  output logic [7:0]  p4_csa1,
  input  logic [7:0]  a8,
  input  logic [7:0]  b8,
  output logic [15:0] p8_cla,
  output logic [15:0] p8_csa1,
  input  logic [31:0] a32,
  input  logic [31:0] b32,
  output logic [63:0] p32_cla,
  output logic [63:0] p32_csa1
);
  vedic_mult_rca  #(.N(4))  u_m4_rca  (.a(a4),  .b(b4),  .p(p4_rca));
  vedic_mult_cla  #(.N(4))  u_m4_cla  (.a(a4),  .b(b4),  .p(p4_cla));
  vedic_mult_csa2 #(.N(4))  u_m4_csa2 (.a(a4),  .b(b4),  .p(p4_csa2));
  vedic_mult_csa1 #(.N(4))  u_m4_csa1 (.a(a4),  .b(b4),  .p(p4_csa1));

  vedic_mult_cla  #(.N(8))  u_m8_cla  (.a(a8),  .b(b8),  .p(p8_cla));
  vedic_mult_csa1 #(.N(8))  u_m8_csa1 (.a(a8),  .b(b8),  .p(p8_csa1));

  vedic_mult_cla  #(.N(32)) u_m32_cla  (.a(a32), .b(b32), .p(p32_cla));
  vedic_mult_csa1 #(.N(32)) u_m32_csa1 (.a(a32), .b(b32), .p(p32_csa1));
endmodule
