// tb_golay_encoder: encodes all 4096 messages. Each output is compared with
// the bit-serial reference, and the weight distribution of the 24-bit code
// is checked against the known one of the extended Golay code
// (1 x weight 0, 759 x 8, 2576 x 12, 759 x 16, 1 x 24), which also proves
// the minimum distance of 8.
module tb_golay_encoder;
  import golay_ref_pkg::*;

  logic [11:0] msg;
  logic [22:0] code23;
  logic [23:0] code24;
  int checks = 0, failures = 0;
  int hist [25];

  golay_encoder dut (.msg(msg), .code23(code23), .code24(code24));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[w]) hist[w] = 0;
    for (int i = 0; i < 4096; i++) begin
      msg = 12'(i);
      #1;
      checks++;
      if (code23 !== ref_code23(msg) || code24 !== ref_code24(msg)) begin
        failures++;
        if (failures < 10) $display("FAIL msg=%h got %b exp %b", msg, code24, ref_code24(msg));
      end
      hist[$countones(code24)]++;
    end
    for (int w = 0; w <= 24; w++) begin
      int exp;
      case (w)
        0, 24:  exp = 1;
        8, 16:  exp = 759;
        12:     exp = 2576;
        default: exp = 0;
      endcase
      checks++;
      if (hist[w] != exp) begin
        failures++;
        $display("FAIL weight %0d count %0d exp %0d", w, hist[w], exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
