// Checks bzfad_mult against integer multiplication: every 8 x 8 operand pair
// (65536 products) on the 8-bit instance, and corner cases plus 3000 random pairs
// on a 16-bit instance. For every operation it also checks the latency (done
// exactly N+1 clock edges after the edge that accepted start, busy for N
// cycles), that done is a single-cycle pulse and that the product holds after
// done. A start raised while busy must be ignored.
module bzfad_mult_tb;
  logic clk = 0, rst_n = 0;
  logic        st8, bz8, dn8;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  logic        st16, bz16, dn16;
  logic [15:0] x16, y16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  bzfad_mult #(.N(8))  dut8  (.clk, .rst_n, .start(st8),  .x(x8),  .y(y8),  .busy(bz8),  .done(dn8),  .product(p8));
  bzfad_mult #(.N(16)) dut16 (.clk, .rst_n, .start(st16), .x(x16), .y(y16), .busy(bz16), .done(dn16), .product(p16));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic mul8(input logic [7:0] a, input logic [7:0] b, input bit poke);
    int edges = 0, busy_cycles = 0;
    @(negedge clk);
    x8 = a; y8 = b; st8 = 1;
    @(negedge clk);
    st8 = 0;
    x8 = ~a; y8 = ~b;  // operands must have been captured
    edges = 1;
    while (!dn8 && edges < 40) begin
      if (bz8) busy_cycles++;
      if (poke && busy_cycles == 2) st8 = 1; else st8 = 0;
      @(negedge clk);
      edges++;
    end
    st8 = 0;
    check(edges == 9, $sformatf("8-bit done after %0d edges, expected 9", edges));
    check(busy_cycles == 8, $sformatf("8-bit busy %0d cycles, expected 8", busy_cycles));
    check(int'(p8) == int'(a) * int'(b), $sformatf("%0d * %0d = %0d, got %0d", a, b, int'(a) * int'(b), p8));
    @(negedge clk);
    check(!dn8 && !bz8 && int'(p8) == int'(a) * int'(b), "8-bit product held and done single");
  endtask

  task automatic mul16(input logic [15:0] a, input logic [15:0] b);
    int edges;
    longint unsigned e;
    @(negedge clk);
    x16 = a; y16 = b; st16 = 1;
    @(negedge clk);
    st16 = 0;
    edges = 1;
    while (!dn16 && edges < 60) begin
      @(negedge clk);
      edges++;
    end
    e = longint'(a) * longint'(b);
    check(edges == 17, $sformatf("16-bit done after %0d edges, expected 17", edges));
    check(p16 == 32'(e), $sformatf("%0d * %0d = %0d, got %0d", a, b, e, p16));
  endtask

  initial begin
    st8 = 0; st16 = 0; x8 = 0; y8 = 0; x16 = 0; y16 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mul8(8'd13, 8'd11, 1);  // start raised mid-run: ignored
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++)
        mul8(8'(a), 8'(b), 0);
    mul16(16'hFFFF, 16'hFFFF);
    mul16(16'h0000, 16'hFFFF);
    mul16(16'hFFFF, 16'h0001);
    mul16(16'h8000, 16'h8000);
    mul16(16'hAAAA, 16'h5555);
    for (int k = 0; k < 3000; k++) mul16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
