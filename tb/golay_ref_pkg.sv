// golay_ref_pkg: reference model for the testbenches, written independently
// of the RTL. It encodes bit-serially, the way a CRC shift register does:
// the message is fed MSB first into an 11-bit LFSR whose feedback taps are
// the generator polynomial x^11 + x^10 + x^6 + x^5 + x^4 + x^2 + 1.
package golay_ref_pkg;

  // Feedback taps: the polynomial without its x^11 term.
  localparam logic [10:0] TAPS = 11'b100_0111_0101;

  function automatic logic [10:0] ref_check(input logic [11:0] m);
    logic [10:0] sr;
    logic        fb;
    sr = '0;
    for (int i = 11; i >= 0; i--) begin
      fb = m[i] ^ sr[10];
      sr = {sr[9:0], 1'b0};
      if (fb) sr = sr ^ TAPS;
    end
    return sr;
  endfunction

  function automatic logic [22:0] ref_code23(input logic [11:0] m);
    return {m, ref_check(m)};
  endfunction

  function automatic logic [23:0] ref_code24(input logic [11:0] m);
    logic [22:0] c;
    c = ref_code23(m);
    return {c, ^c};
  endfunction

  // Random error mask of exactly n distinct bits among the low `len` bits.
  function automatic logic [23:0] rand_mask(input int n, input int len);
    logic [23:0] e;
    int          b;
    e = '0;
    while ($countones(e) < n) begin
      b = int'($urandom_range(len - 1, 0));
      e[b] = 1'b1;
    end
    return e;
  endfunction

endpackage
