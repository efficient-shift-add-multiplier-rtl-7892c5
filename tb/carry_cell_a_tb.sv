// Exhaustive check of carry_cell_a: c = H_i p_i for all four inputs.
module carry_cell_a_tb;
  logic h, p_bit, c;
  int checks = 0, failures = 0;

  carry_cell_a dut (.h, .p_bit, .c);

  initial begin
    for (int v = 0; v < 4; v++) begin
      {h, p_bit} = 2'(v);
      #1;
      checks++;
      if (c !== (v == 3)) begin
        failures++;
        $display("FAIL h=%b p=%b got c=%b", h, p_bit, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
