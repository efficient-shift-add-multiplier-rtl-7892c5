// Checks prod_lsb_reg (N = 8) against a software model: random one-hot (or zero)
// select, data, write enable and clear each cycle; only the selected bit may
// change on a write, all bits clear on clear.
module prod_lsb_reg_tb;
  logic clk = 0, rst_n = 0;
  logic clear, we, d;
  logic [7:0] sel, q;
  int checks = 0, failures = 0;
  logic [7:0] model;

  prod_lsb_reg #(.N(8)) dut (.clk, .rst_n, .clear, .we, .sel, .d, .q);

  always #5 clk = ~clk;

  initial begin
    int k;
    clear = 0; we = 0; d = 0; sel = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    model = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d q=%b expected %b", t, q, model);
      end
      clear = ($urandom % 32) == 0;
      we    = ($urandom % 4) != 0;
      k     = int'($urandom % 9);
      sel   = (k == 8) ? 8'h00 : 8'(1 << k);
      d     = 1'($urandom);
      if (clear)                   model = '0;
      else if (we && k != 8)       model[k] = d;
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
