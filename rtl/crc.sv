// crc: check-bit generator of the (23,12) Golay code.
//
// The 12-bit message m is treated as a polynomial (m[11] = x^11 coefficient),
// shifted up by x^11 and divided by the generator polynomial p, which is an
// input: 12 coefficients, x^11 at bit 11 down to x^0 at bit 0. Each of the 12
// division steps XORs p into the running dividend when its leading bit is 1
// (a 12-wide XOR per step). The 11-bit remainder is appended to the message,
// so the output is the systematic codeword {m, remainder}.
//
// Purely combinational; the result is valid in the same cycle. The port
// names and the division into a message path and a 12-wide XOR follow the
// document; the polynomial value is set by whoever instantiates the block.
module crc (
  input  logic [11:0] m,
  input  logic [11:0] p,
  output logic [22:0] transoutput
);

  logic [22:0] dividend [13];

  always_comb begin
    dividend[0] = {m, 11'b0};
    for (int s = 0; s < 12; s++) begin
      dividend[s+1] = dividend[s];
      if (dividend[s][22-s]) dividend[s+1][22-s -: 12] = dividend[s][22-s -: 12] ^ p;
    end
  end

  assign transoutput = {m, dividend[12][10:0]};

endmodule
