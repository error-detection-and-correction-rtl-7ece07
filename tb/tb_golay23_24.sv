// tb_golay23_24: checks the 23-to-24-bit extension. The two input words of
// the published waveform are checked against the outputs shown there, then
// random words: the upper 23 output bits equal the input and the whole
// output has even weight.
module tb_golay23_24;
  logic [22:0] g1;
  logic [23:0] g2;
  int checks = 0, failures = 0;

  golay23_24 dut (.g1(g1), .g2(g2));

  task automatic check(input logic [23:0] exp);
    #1;
    checks++;
    if (g2 !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL g1=%b got %b exp %b", g1, g2, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g1 = 23'b11111111000000001110100; check(24'b111111110000000011101000);
    g1 = 23'b11111111000000001110101; check(24'b111111110000000011101011);
    for (int i = 0; i < 5000; i++) begin
      logic [23:0] e;
      g1 = 23'($urandom);
      e = {g1, 1'b0};
      if ($countones(g1) % 2 == 1) e[0] = 1'b1;
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
