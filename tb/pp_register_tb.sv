// Checks pp_register (N = 8) against a software model of the register:
// random ybit, sum, cout, step and clear each cycle; the model computes
// pp = ybit ? {cout, sum} : {0, acc}, expects pp_lsb = pp[0] combinationally and
// acc <= pp >> 1 on a step, acc <= 0 on a clear.
module pp_register_tb;
  logic clk = 0, rst_n = 0;
  logic clear, step, ybit, cout, pp_lsb;
  logic [7:0] sum, acc;
  int checks = 0, failures = 0;
  int unsigned model_acc;

  pp_register #(.N(8)) dut (.clk, .rst_n, .clear, .step, .ybit, .sum, .cout, .acc, .pp_lsb);

  always #5 clk = ~clk;

  initial begin
    int unsigned pp;
    clear = 0; step = 0; ybit = 0; cout = 0; sum = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model_acc = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (int'(acc) != int'(model_acc)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d acc=%h expected %h", t, acc, model_acc);
      end
      clear = ($urandom % 16) == 0;
      step  = ($urandom % 4) != 0;
      ybit  = 1'($urandom);
      cout  = 1'($urandom);
      sum   = 8'($urandom);
      #1;
      pp = ybit ? ((int'(cout) << 8) | int'(sum)) : model_acc;
      checks++;
      if (int'(pp_lsb) != int'(pp & 1)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d pp_lsb=%b expected %0d", t, pp_lsb, pp & 1);
      end
      if (clear)     model_acc = 0;
      else if (step) model_acc = pp >> 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
