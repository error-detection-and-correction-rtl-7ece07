// tb_crc: exhaustive test of the CRC check-bit generator. Every one of the
// 4096 messages is encoded with the Golay generator polynomial and compared
// with a bit-serial LFSR reference; the message part must pass through and
// the code must be cyclic (a codeword rotated by one place is a codeword).
module tb_crc;
  import golay_ref_pkg::*;

  logic [11:0] m, p;
  logic [22:0] transoutput;
  int checks = 0, failures = 0;

  crc dut (.m(m), .p(p), .transoutput(transoutput));

  function automatic bit is_codeword(input logic [22:0] c);
    return ref_check(c[22:11]) == c[10:0];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = 12'hC75;
    for (int i = 0; i < 4096; i++) begin
      m = 12'(i);
      #1;
      checks++;
      if (transoutput !== ref_code23(m)) begin
        failures++;
        if (failures < 10) $display("FAIL m=%h got %b exp %b", m, transoutput, ref_code23(m));
      end
      checks++;
      if (!is_codeword({transoutput[21:0], transoutput[22]})) begin
        failures++;
        if (failures < 10) $display("FAIL not cyclic m=%h", m);
      end
    end
    // Message 0x001: its check bits are x^11 mod g(x), which is g(x) without
    // its x^11 term, 11'h475.
    m = 12'h001; #1;
    checks++;
    if (transoutput[10:0] !== 11'h475) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
