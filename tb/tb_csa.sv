// tb_csa: self-check of the carry save adder. The default 4-bit adder is
// run over all 4096 operand triples and a 6-bit instance (the width used by
// the single-carry-save multiplier) over all 262144 triples; a 24-bit
// instance gets random triples. Each result is compared with the integer sum
// x+y+z. A watchdog ends the run if it stalls.
module tb_csa;
  logic [3:0]  x4, y4, z4;
  logic [5:0]  s4;
  logic [5:0]  x6, y6, z6;
  logic [7:0]  s6;
  logic [23:0] x24, y24, z24;
  logic [25:0] s24;
  int unsigned checks = 0, failures = 0;

  csa           dut4  (.x(x4),  .y(y4),  .z(z4),  .sum(s4));
  csa #(.W(6))  dut6  (.x(x6),  .y(y6),  .z(z6),  .sum(s6));
  csa #(.W(24)) dut24 (.x(x24), .y(y24), .z(z24), .sum(s24));

  initial begin
    x24 = '0; y24 = '0; z24 = '0;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int k = 0; k < 64; k++) begin
          x6 = 6'(i); y6 = 6'(j); z6 = 6'(k);
          x4 = 4'(i); y4 = 4'(j); z4 = 4'(k);
          #1;
          checks++;
          if (s6 !== 8'(i + j + k)) begin
            failures++;
            if (failures < 10) $display("FAIL W=6 %0d+%0d+%0d: got %0d", i, j, k, s6);
          end
          if (i < 16 && j < 16 && k < 16) begin
            checks++;
            if (s4 !== 6'(i + j + k)) begin
              failures++;
              if (failures < 10) $display("FAIL W=4 %0d+%0d+%0d: got %0d", i, j, k, s4);
            end
          end
        end
    for (int n = 0; n < 5000; n++) begin
      logic [25:0] r;
      x24 = 24'($urandom);
      y24 = 24'($urandom);
      z24 = (n == 0) ? 24'hFF_FFFF : 24'($urandom);
      if (n == 0) begin x24 = 24'hFF_FFFF; y24 = 24'hFF_FFFF; end
      #1;
      r = 26'(x24) + 26'(y24) + 26'(z24);
      checks++;
      if (s24 !== r) begin
        failures++;
        if (failures < 10) $display("FAIL W=24 %h+%h+%h: got %h", x24, y24, z24, s24);
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
