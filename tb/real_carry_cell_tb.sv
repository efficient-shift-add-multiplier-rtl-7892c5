// Exhaustive check of real_carry_cell: all 16 input combinations against
// c = (G + P G') p_i, evaluated with integer arithmetic.
module real_carry_cell_tb;
  import bzfad_pkg::*;
  gp_t  hi;
  logic g_lo, p_bit, c;
  int checks = 0, failures = 0;

  real_carry_cell dut (.hi, .g_lo, .p_bit, .c);

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ec;
      {hi.g, hi.p, g_lo, p_bit} = 4'(v);
      ec = ((int'(hi.g) + int'(hi.p) * int'(g_lo)) > 0) ? int'(p_bit) : 0;
      #1;
      checks++;
      if (int'(c) != ec) begin
        failures++;
        $display("FAIL in=%b got c=%b", 4'(v), c);
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
