// Exhaustive check of prefix_gp_cell: all 16 input pairs against the prefix
// operator (G, P) o (G', P') = (G + P G', P P'), evaluated here with integer
// arithmetic rather than the package function.
module prefix_gp_cell_tb;
  import bzfad_pkg::*;
  gp_t hi, lo, o;
  int checks = 0, failures = 0;

  prefix_gp_cell dut (.hi, .lo, .o);

  initial begin
    for (int v = 0; v < 16; v++) begin
      int eg, ep;
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      eg = (int'(hi.g) + int'(hi.p) * int'(lo.g)) > 0;
      ep = int'(hi.p) * int'(lo.p);
      #1;
      checks++;
      if (int'(o.g) != eg || int'(o.p) != ep) begin
        failures++;
        $display("FAIL in=%b got G=%b P=%b", 4'(v), o.g, o.p);
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
