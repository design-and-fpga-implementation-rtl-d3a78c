// tb_cla: self-check of the carry look-ahead adder. The default 4-bit adder is run
// exhaustively (256 pairs); a 32-bit instance gets random operands plus the
// all-ones and carry-chain corner cases. sum and cout are compared with the
// integer sum a+b. A watchdog ends the run if it stalls.
module tb_cla;
  logic [3:0]  a4, b4, s4;
  logic        c4;
  logic [31:0] a32, b32, s32;
  logic        c32;
  int unsigned checks = 0, failures = 0;

  cla              dut4  (.a(a4),  .b(b4),  .sum(s4),  .cout(c4));
  cla #(.W(32))    dut32 (.a(a32), .b(b32), .sum(s32), .cout(c32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [32:0] ref_sum;
    a32 = x;
    b32 = y;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y};
    checks++;
    if ({c32, s32} !== ref_sum) begin
      failures++;
      $display("FAIL W=32 %h+%h: got %h", x, y, {c32, s32});
    end
  endtask

  initial begin
    a32 = '0;
    b32 = '0;
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if ({c4, s4} !== 5'(i + j)) begin
          failures++;
          $display("FAIL W=4 %0d+%0d: got %0d", i, j, {c4, s4});
        end
      end
    end
    check32(32'hFFFF_FFFF, 32'h0000_0001);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'h7FFF_FFFF, 32'h0000_0001);
    check32(32'h0000_0000, 32'h0000_0000);
    for (int n = 0; n < 5000; n++) check32($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
