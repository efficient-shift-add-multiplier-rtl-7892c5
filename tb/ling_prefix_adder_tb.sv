// Checks ling_prefix_adder at both intended widths against integer addition:
// every pair of operands for the 8-bit adder (65536 sums) and, for the 16-bit
// adder, corner cases (carry rippling through every position, all ones, zero)
// plus 20000 random pairs.
module ling_prefix_adder_tb;
  logic [7:0]  a8, b8, s8;
  logic        c8;
  logic [15:0] a16, b16, s16;
  logic        c16;
  int checks = 0, failures = 0;

  ling_prefix_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .sum(s8),  .cout(c8));
  ling_prefix_adder #(.W(16)) dut16 (.a(a16), .b(b16), .sum(s16), .cout(c16));

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    int unsigned e;
    a16 = x; b16 = y;
    #1;
    e = int'(x) + int'(y);
    checks++;
    if ({c16, s16} !== 17'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h + %h got %h", x, y, {c16, s16});
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if ({c8, s8} !== 9'(x + y)) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d + %0d got %0d", x, y, {c8, s8});
        end
      end
    end
    check16(16'hFFFF, 16'h0001);
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h0000, 16'h0000);
    check16(16'h8000, 16'h8000);
    for (int k = 0; k < 16; k++) begin
      check16(16'hFFFF >> k, 16'(1));
      check16(16'(1) << k, 16'(1) << k);
    end
    for (int k = 0; k < 20000; k++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
