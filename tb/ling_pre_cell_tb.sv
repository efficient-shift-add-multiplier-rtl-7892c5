// Exhaustive check of ling_pre_cell: all four input combinations against
// g = a AND b, p = a OR b, d = a XOR b written out as truth-table constants.
module ling_pre_cell_tb;
  import bzfad_pkg::*;
  logic a, b, d;
  gp_t  gp;
  int checks = 0, failures = 0;
  // Expected {g, p, d} for inputs {a, b} = 00, 01, 10, 11.
  localparam logic [2:0] EXP [4] = '{3'b000, 3'b011, 3'b011, 3'b110};

  ling_pre_cell dut (.a, .b, .gp, .d);

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({gp.g, gp.p, d} !== EXP[v]) begin
        failures++;
        $display("FAIL a=%b b=%b got g=%b p=%b d=%b", a, b, gp.g, gp.p, d);
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
