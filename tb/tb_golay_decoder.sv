// tb_golay_decoder: drives reference codewords of random messages through
// the extended Golay decoder with error patterns added:
//   none; every single-bit error; every burst of 2 and of 3 adjacent bits;
//   random 2- and 3-bit errors          -> message restored, flags correct,
//                                          err_weight and code_out exact;
//   random 4-bit errors                 -> err_uncorrectable.
module tb_golay_decoder;
  import golay_ref_pkg::*;

  logic [23:0] r;
  logic [11:0] msg;
  logic        err_detected, err_corrected, err_uncorrectable;
  logic [2:0]  err_weight;
  logic [23:0] code_out;
  int checks = 0, failures = 0;

  golay_decoder dut (
    .r(r), .msg(msg), .err_detected(err_detected), .err_corrected(err_corrected),
    .err_uncorrectable(err_uncorrectable), .err_weight(err_weight), .code_out(code_out));

  task automatic try_pattern(input logic [11:0] m, input logic [23:0] e);
    logic [23:0] c;
    int          n;
    c = ref_code24(m);
    n = $countones(e);
    r = c ^ e;
    #1;
    checks++;
    if (n <= 3) begin
      if (msg !== m || code_out !== c || err_detected !== (n != 0) ||
          err_corrected !== (n != 0) || err_uncorrectable || int'(err_weight) != n) begin
        failures++;
        if (failures < 10)
          $display("FAIL m=%h e=%b got msg=%h det=%b cor=%b unc=%b w=%0d", m, e, msg,
                   err_detected, err_corrected, err_uncorrectable, err_weight);
      end
    end else begin
      if (!err_detected || !err_uncorrectable || err_corrected) begin
        failures++;
        if (failures < 10) $display("FAIL 4-bit error not flagged m=%h e=%b", m, e);
      end
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 60; t++) begin
      logic [11:0] m;
      m = 12'($urandom);
      try_pattern(m, '0);
      for (int b = 0; b < 24; b++) try_pattern(m, 24'(1) << b);
      for (int b = 0; b < 23; b++) try_pattern(m, 24'(3) << b);
      for (int b = 0; b < 22; b++) try_pattern(m, 24'(7) << b);
      for (int k = 0; k < 20; k++) try_pattern(m, rand_mask(2, 24));
      for (int k = 0; k < 40; k++) try_pattern(m, rand_mask(3, 24));
      for (int k = 0; k < 20; k++) try_pattern(m, rand_mask(4, 24));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
