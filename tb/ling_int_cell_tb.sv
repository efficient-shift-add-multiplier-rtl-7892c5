// Exhaustive check of ling_int_cell: all 16 input combinations against
// G* = g_hi OR g_lo and P* = p_hi AND p_lo.
module ling_int_cell_tb;
  import bzfad_pkg::*;
  logic g_hi, g_lo, p_hi, p_lo;
  gp_t  gp;
  int checks = 0, failures = 0;

  ling_int_cell dut (.g_hi, .g_lo, .p_hi, .p_lo, .gp);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {g_hi, g_lo, p_hi, p_lo} = 4'(v);
      #1;
      checks++;
      if (gp.g !== (v >= 4 ? 1'b1 : 1'b0) || gp.p !== ((v % 4) == 3)) begin
        failures++;
        $display("FAIL in=%b got G=%b P=%b", 4'(v), gp.g, gp.p);
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
