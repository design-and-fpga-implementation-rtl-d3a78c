// tb_vedic_top: end-to-end check of all multiplier configurations at their
// built sizes, with the top at its default parameters.
//
// The four 4x4 architectures are driven over all 256 operand pairs and must
// each return a*b. The two 8x8 multipliers are driven over all 65536 pairs.
// The two 32x32 multipliers get corner operands, one directed pair that
// makes the middle column overflow only after the upper half of q0 is added,
// and random pairs. Every product is compared with an integer product.
//
// From the operands alone the testbench counts, per size, the three carry
// situations of the middle column of partial products: overflow of q1+q2
// (ca1), overflow only when q0's upper half is added (ca2) and a middle sum
// of N+1 bits or more. A size where one of them never happened counts as a
// failure. A watchdog ends the run if it stalls.
module tb_vedic_top;
  logic [3:0]  a4, b4;
  logic [7:0]  p4_rca, p4_cla, p4_csa2, p4_csa1;
  logic [7:0]  a8, b8;
  logic [15:0] p8_cla, p8_csa1;
  logic [31:0] a32, b32;
  logic [63:0] p32_cla, p32_csa1;
  int unsigned checks = 0, failures = 0;
  longint unsigned n_ca1[3], n_ca2[3], n_mid[3];
  localparam int SIZES[3] = '{4, 8, 32};

  vedic_top dut (
    .a4(a4), .b4(b4),
    .p4_rca(p4_rca), .p4_cla(p4_cla), .p4_csa2(p4_csa2), .p4_csa1(p4_csa1),
    .a8(a8), .b8(b8), .p8_cla(p8_cla), .p8_csa1(p8_csa1),
    .a32(a32), .b32(b32), .p32_cla(p32_cla), .p32_csa1(p32_csa1)
  );

  task automatic classify(input int sz, input longint unsigned x, input longint unsigned y,
                          input int n);
    longint unsigned h, mask, q0, q1, q2, s1, lim;
    h    = n / 2;
    mask = (64'd1 << h) - 1;
    lim  = 64'd1 << n;
    q0 = (x & mask) * (y & mask);
    q1 = (x & mask) * (y >> h);
    q2 = (x >> h) * (y & mask);
    s1 = q1 + q2;
    if (s1 >= lim) n_ca1[sz]++;
    if ((s1 % lim) + (q0 >> h) >= lim) n_ca2[sz]++;
    if (s1 + (q0 >> h) >= lim) n_mid[sz]++;
  endtask

  task automatic check(input string what, input longint unsigned got,
                       input longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic run32(input logic [31:0] x, input logic [31:0] y);
    longint unsigned r;
    a32 = x;
    b32 = y;
    #1;
    r = 64'(x) * 64'(y);
    check("32x32 cla", p32_cla, r);
    check("32x32 csa1", p32_csa1, r);
    classify(2, 64'(x), 64'(y), 32);
  endtask

  initial begin
    n_ca1 = '{0, 0, 0}; n_ca2 = '{0, 0, 0}; n_mid = '{0, 0, 0};
    a4 = '0; b4 = '0; a8 = '0; b8 = '0; a32 = '0; b32 = '0;

    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        check("4x4 rca",  64'(p4_rca),  64'(i * j));
        check("4x4 cla",  64'(p4_cla),  64'(i * j));
        check("4x4 csa2", 64'(p4_csa2), 64'(i * j));
        check("4x4 csa1", 64'(p4_csa1), 64'(i * j));
        classify(0, 64'(i), 64'(j), 4);
      end

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        check("8x8 cla",  64'(p8_cla),  64'(i * j));
        check("8x8 csa1", 64'(p8_csa1), 64'(i * j));
        classify(1, 64'(i), 64'(j), 8);
      end

    run32(32'h0000_0000, 32'hFFFF_FFFF);
    run32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run32(32'h8000_0000, 32'h8000_0000);
    run32(32'h0000_0001, 32'hDEAD_BEEF);
    run32(32'h4F75_F643, 32'hBBAB_F328);  // ca2 without ca1 at the top level
    for (int n = 0; n < 20000; n++) run32($urandom, $urandom);

    for (int s = 0; s < 3; s++) begin
      $display("%0dx%0d: ca1 %0d, ca2 %0d, middle overflow %0d", SIZES[s], SIZES[s],
               n_ca1[s], n_ca2[s], n_mid[s]);
      if (n_ca1[s] == 0 || n_ca2[s] == 0 || n_mid[s] == 0) begin
        failures++;
        $display("FAIL: a middle-column carry case was never exercised");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
