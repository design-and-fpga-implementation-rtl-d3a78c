// tb_vedic_mult_csa2: self-check of the two-carry-save-adder Vedic multiplier.
// The default 4x4 multiplier and an 8x8 instance are run over every operand
// pair (256 and 65536); a 16x16 instance gets random operands and the
// all-ones corner. Every product is compared with the integer product a*b.
// The testbench also works out, from the operands alone, when the middle
// column of partial products overflows N bits in the first addition (ca1),
// only after adding the upper half of q0 (ca2), or at all (mid >= 2^N), and
// counts a failure if the 4x4 or 8x8 sweep never produced one of them.
// A watchdog ends the run if it stalls.
module tb_vedic_mult_csa2;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int unsigned checks = 0, failures = 0;
  int unsigned n_ca1[2], n_ca2[2], n_mid[2];

  vedic_mult_csa2           dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_mult_csa2 #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult_csa2 #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  // classify one operand pair of an n-bit multiplication (n = 4 or 8)
  task automatic classify(input int sz, input int unsigned x, input int unsigned y,
                          input int n);
    int unsigned h, mask, q0, q1, q2, s1;
    h    = n / 2;
    mask = (1 << h) - 1;
    q0 = (x & mask) * (y & mask);
    q1 = (x & mask) * (y >> h);
    q2 = (x >> h) * (y & mask);
    s1 = q1 + q2;
    if (s1 >= (1 << n)) n_ca1[sz]++;
    if ((s1 % (1 << n)) + (q0 >> h) >= (1 << n)) n_ca2[sz]++;
    if (s1 + (q0 >> h) >= (1 << n)) n_mid[sz]++;
  endtask

  initial begin
    a8 = '0; b8 = '0; a16 = '0; b16 = '0;
    n_ca1 = '{0, 0}; n_ca2 = '{0, 0}; n_mid = '{0, 0};
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        if (i < 16 && j < 16) begin
          a4 = 4'(i);
          b4 = 4'(j);
        end
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d*%0d: got %0d", i, j, p8);
        end
        classify(1, i, j, 8);
        if (i < 16 && j < 16) begin
          checks++;
          if (p4 !== 8'(i * j)) begin
            failures++;
            if (failures < 10) $display("FAIL 4x4 %0d*%0d: got %0d", i, j, p4);
          end
          classify(0, i, j, 4);
        end
      end
    end
    for (int n = 0; n < 5000; n++) begin
      a16 = (n == 0) ? 16'hFFFF : 16'($urandom);
      b16 = (n == 0) ? 16'hFFFF : 16'($urandom);
      #1;
      checks++;
      if (p16 !== 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures < 10) $display("FAIL 16x16 %0d*%0d: got %0d", a16, b16, p16);
      end
    end
    for (int s = 0; s < 2; s++) begin
      $display("size %0d: ca1 %0d times, ca2 %0d times, mid overflow %0d times",
               s == 0 ? 4 : 8, n_ca1[s], n_ca2[s], n_mid[s]);
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
