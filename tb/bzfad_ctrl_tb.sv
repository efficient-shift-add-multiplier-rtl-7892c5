// Checks bzfad_ctrl (N = 8 and N = 5): after a start it must be busy for exactly
// N cycles with the index counting 0 .. N-1, pulse done for one cycle after the
// last index, pulse load only in the start cycle, and ignore a start raised while
// busy. Expected cycle counts come from the one-bit-per-clock schedule.
module bzfad_ctrl_tb;
  logic clk = 0, rst_n = 0;
  logic st8, ld8, bz8, dn8;
  logic [2:0] ix8;
  logic st5, ld5, bz5, dn5;
  logic [2:0] ix5;
  int checks = 0, failures = 0;
  int cycles = 0;

  bzfad_ctrl #(.N(8)) dut8 (.clk, .rst_n, .start(st8), .load(ld8), .busy(bz8), .idx(ix8), .done(dn8));
  bzfad_ctrl #(.N(5)) dut5 (.clk, .rst_n, .start(st5), .load(ld5), .busy(bz5), .idx(ix5), .done(dn5));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cycles, what);
    end
  endtask

  // Runs one operation on the 8-bit instance; extra_start raises start in the
  // middle of the run, which must be ignored.
  task automatic run8(input bit extra_start);
    int busy_cycles;
    @(negedge clk);
    st8 = 1;
    #1 check(ld8 && !bz8, "load in the start cycle");
    @(negedge clk);
    st8 = 0;
    busy_cycles = 0;
    while (bz8) begin
      check(int'(ix8) == busy_cycles, $sformatf("index %0d in busy cycle %0d", ix8, busy_cycles));
      check(!ld8 && !dn8, "no load or done while busy");
      if (extra_start && busy_cycles == 3) st8 = 1;
      busy_cycles++;
      @(negedge clk);
      if (busy_cycles > 20) break;
    end
    st8 = 0;
    check(busy_cycles == 8, $sformatf("busy for %0d cycles, expected 8", busy_cycles));
    check(dn8, "done right after the last bit");
    @(negedge clk);
    check(!dn8 && !bz8, "done is a single pulse and the controller is idle");
  endtask

  initial begin
    st8 = 0; st5 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!bz8 && !dn8 && !ld8, "idle after reset");
    run8(0);
    run8(1);
    // Back-to-back on the 5-bit instance: start held high restarts in the done cycle.
    @(negedge clk);
    st5 = 1;
    begin
      int busy_cycles = 0, dones = 0;
      for (int k = 0; k < 14; k++) begin
        @(negedge clk);
        if (bz5) busy_cycles++;
        if (dn5) dones++;
      end
      st5 = 0;
      // 14 cycles: busy 5, done/reload 1, busy 5, done/reload 1, busy 2.
      check(busy_cycles == 12, $sformatf("5-bit busy %0d cycles of 14, expected 12", busy_cycles));
      check(dones == 2, $sformatf("5-bit done %0d times, expected 2", dones));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
