// tb_weight_unit: all 4096 inputs of the 12-bit weight unit, compared with
// a count of ones made bit by bit in the testbench.
module tb_weight_unit;
  logic [11:0] v;
  logic [3:0]  w;
  int checks = 0, failures = 0;

  weight_unit dut (.v(v), .w(w));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      int n;
      v = 12'(i);
      n = 0;
      for (int b = 0; b < 12; b++) n += int'(v[b]);
      #1;
      checks++;
      if (int'(w) != n) begin
        failures++;
        if (failures < 10) $display("FAIL v=%b got %0d exp %0d", v, w, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
