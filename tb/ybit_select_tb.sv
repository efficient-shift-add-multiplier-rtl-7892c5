// Checks ybit_select for N = 8 and N = 16: for random multipliers and every index
// the one-hot vector must be 1 << idx and ybit must equal (y >> idx) & 1,
// computed with integer shifts. The index widths (3 and 4 bits) cannot leave
// the range 0 .. N-1, so that case is not exercised.
module ybit_select_tb;
  logic [7:0]  y8, oh8;
  logic [2:0]  i8;
  logic        b8;
  logic [15:0] y16, oh16;
  logic [3:0]  i16;
  logic        b16;
  int checks = 0, failures = 0;

  ybit_select #(.N(8))  dut8  (.y(y8),  .idx(i8),  .onehot(oh8),  .ybit(b8));
  ybit_select #(.N(16)) dut16 (.y(y16), .idx(i16), .onehot(oh16), .ybit(b16));

  initial begin
    for (int t = 0; t < 200; t++) begin
      y8  = 8'($urandom);
      y16 = 16'($urandom);
      if (t == 0) begin y8 = '1; y16 = '1; end
      if (t == 1) begin y8 = '0; y16 = '0; end
      for (int k = 0; k < 16; k++) begin
        i8  = 3'(k % 8);
        i16 = 4'(k);
        #1;
        checks += 2;
        if (oh8 !== 8'(1 << (k % 8)) || b8 !== (((y8 >> (k % 8)) & 8'd1) != 0)) begin
          failures++;
          $display("FAIL8 y=%h idx=%0d oh=%b bit=%b", y8, k % 8, oh8, b8);
        end
        if (oh16 !== 16'(1 << k) || b16 !== (((y16 >> k) & 16'd1) != 0)) begin
          failures++;
          $display("FAIL16 y=%h idx=%0d oh=%b bit=%b", y16, k, oh16, b16);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
