// End-to-end test of bzfad_top at its default sizes (8 x 8 and 16 x 16), both
// multipliers running at the same time from independent driver threads.
//
// Each thread issues corner-case and random operations, sometimes back to back
// (start held so the next operation is accepted in the done cycle) and sometimes
// with a stray start pulse in the middle of a run, and checks every product
// against integer multiplication and every latency against N+1 clock edges.
// It also counts how often each mechanism of the multiplier occurred (datapath
// events from a bit-serial model of each checked operation, handshake events
// from the ports) and fails if one never did: a zero multiplier bit bypassing the adder, a one bit going
// through the Ling adder, an addition producing a carry out, a start ignored
// while busy, and a start accepted in the same cycle as done.
module bzfad_top_tb;
  logic clk = 0, rst_n = 0;
  logic        start8, busy8, done8;
  logic [7:0]  x8, y8;
  logic [15:0] p8;
  logic        start16, busy16, done16;
  logic [15:0] x16, y16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  // Mechanism counters, index 0: 8-bit multiplier, 1: 16-bit multiplier.
  int n_bypass [2], n_add [2], n_carry [2], n_ignored [2], n_chained [2], n_ops [2];

  bzfad_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Port-level mechanism monitors, sampled on the clock.
  always @(posedge clk) if (rst_n) begin
    if (busy8  && start8)  n_ignored[0]++;
    if (busy16 && start16) n_ignored[1]++;
    if (done8  && start8)  n_chained[0]++;
    if (done16 && start16) n_chained[1]++;
  end

  // Datapath mechanisms of one operation, from a bit-serial model of the
  // multiplier: per multiplier bit, either a bypass (bit 0) or an addition
  // (bit 1), and whether that addition carries out of the N-bit adder.
  task automatic count_mechanisms(input int m, input int n, input longint unsigned a,
                                  input longint unsigned b);
    longint unsigned acc = 0, t;
    for (int k = 0; k < n; k++) begin
      if (((b >> k) & 1) != 0) begin
        t = acc + a;
        n_add[m]++;
        if ((t >> n) != 0) n_carry[m]++;
      end else begin
        t = acc;
        n_bypass[m]++;
      end
      acc = t >> 1;
    end
  endtask

  // One 8-bit operation. chain: keep start high into the done cycle and return
  // with the next operation already accepted. poke: pulse start mid-run.
  task automatic op8(input logic [7:0] a, input logic [7:0] b, input bit poke, input bit chain,
                     input logic [7:0] na, input logic [7:0] nb);
    int edges = 1;
    x8 = a; y8 = b; start8 = 1;
    @(negedge clk);
    start8 = 0;
    while (!done8 && edges < 40) begin
      start8 = poke && edges == 4;
      @(negedge clk);
      edges++;
    end
    check(edges == 9, $sformatf("8-bit latency %0d edges, expected 9", edges));
    check(int'(p8) == int'(a) * int'(b), $sformatf("8-bit %0d * %0d got %0d", a, b, p8));
    n_ops[0]++;
    count_mechanisms(0, 8, 64'(a), 64'(b));
    if (chain) begin
      x8 = na; y8 = nb; start8 = 1;
    end else begin
      start8 = 0;
      @(negedge clk);
    end
  endtask

  task automatic op16(input logic [15:0] a, input logic [15:0] b, input bit poke, input bit chain,
                      input logic [15:0] na, input logic [15:0] nb);
    int edges = 1;
    longint unsigned e = longint'(a) * longint'(b);
    x16 = a; y16 = b; start16 = 1;
    @(negedge clk);
    start16 = 0;
    while (!done16 && edges < 60) begin
      start16 = poke && edges == 7;
      @(negedge clk);
      edges++;
    end
    check(edges == 17, $sformatf("16-bit latency %0d edges, expected 17", edges));
    check(p16 == 32'(e), $sformatf("16-bit %0d * %0d got %0d", a, b, p16));
    n_ops[1]++;
    count_mechanisms(1, 16, 64'(a), 64'(b));
    if (chain) begin
      x16 = na; y16 = nb; start16 = 1;
    end else begin
      start16 = 0;
      @(negedge clk);
    end
  endtask

  // A chained operation: the first is started by op8/op16 as usual, the next is
  // already accepted when it returns, so it is finished without a new start.
  task automatic finish8(input logic [7:0] a, input logic [7:0] b);
    int edges = 1;
    @(negedge clk);
    start8 = 0;
    while (!done8 && edges < 40) begin
      @(negedge clk);
      edges++;
    end
    check(edges == 9, $sformatf("chained 8-bit latency %0d edges", edges));
    check(int'(p8) == int'(a) * int'(b), $sformatf("chained 8-bit %0d * %0d got %0d", a, b, p8));
    n_ops[0]++;
    count_mechanisms(0, 8, 64'(a), 64'(b));
    @(negedge clk);
  endtask

  task automatic finish16(input logic [15:0] a, input logic [15:0] b);
    int edges = 1;
    longint unsigned e = longint'(a) * longint'(b);
    @(negedge clk);
    start16 = 0;
    while (!done16 && edges < 60) begin
      @(negedge clk);
      edges++;
    end
    check(edges == 17, $sformatf("chained 16-bit latency %0d edges", edges));
    check(p16 == 32'(e), $sformatf("chained 16-bit %0d * %0d got %0d", a, b, p16));
    n_ops[1]++;
    count_mechanisms(1, 16, 64'(a), 64'(b));
    @(negedge clk);
  endtask

  initial begin
    start8 = 0; start16 = 0; x8 = 0; y8 = 0; x16 = 0; y16 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      begin
        op8(8'hFF, 8'hFF, 0, 0, 0, 0);
        op8(8'h00, 8'h5A, 0, 0, 0, 0);
        op8(8'h80, 8'h01, 1, 0, 0, 0);
        op8(8'd200, 8'd3, 0, 1, 8'd7, 8'd9);
        finish8(8'd7, 8'd9);
        for (int k = 0; k < 4000; k++) begin
          automatic logic [7:0] a = 8'($urandom), b = 8'($urandom);
          automatic logic [7:0] na = 8'($urandom), nb = 8'($urandom);
          automatic bit chain = ($urandom % 5) == 0;
          op8(a, b, ($urandom % 7) == 0, chain, na, nb);
          if (chain) finish8(na, nb);
        end
      end
      begin
        op16(16'hFFFF, 16'hFFFF, 0, 0, 0, 0);
        op16(16'h0000, 16'h1234, 0, 0, 0, 0);
        op16(16'h8001, 16'h8001, 1, 0, 0, 0);
        op16(16'd40000, 16'd3, 0, 1, 16'd999, 16'd1001);
        finish16(16'd999, 16'd1001);
        for (int k = 0; k < 2000; k++) begin
          automatic logic [15:0] a = 16'($urandom), b = 16'($urandom);
          automatic logic [15:0] na = 16'($urandom), nb = 16'($urandom);
          automatic bit chain = ($urandom % 5) == 0;
          op16(a, b, ($urandom % 7) == 0, chain, na, nb);
          if (chain) finish16(na, nb);
        end
      end
    join
    for (int m = 0; m < 2; m++) begin
      $display("%0d-bit multiplier: %0d products, %0d bypassed zero bits, %0d additions, %0d adder carry-outs, %0d ignored starts, %0d chained starts",
               m == 0 ? 8 : 16, n_ops[m], n_bypass[m], n_add[m], n_carry[m], n_ignored[m], n_chained[m]);
      check(n_bypass[m]  > 0, "zero-bit bypass never happened");
      check(n_add[m]     > 0, "addition never happened");
      check(n_carry[m]   > 0, "adder carry-out never happened");
      check(n_ignored[m] > 0, "start while busy never happened");
      check(n_chained[m] > 0, "start in the done cycle never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
