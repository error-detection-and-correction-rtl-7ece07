// golay23_24: converts a (23,12) Golay codeword into the (24,12) extended
// Golay codeword.
//
// The 23 input bits move up by one place (g2[23:1] = g1) and the new bit
// g2[0] is the XOR of all 23 input bits, so the 24-bit output has even
// weight. Choosing between "append 1" and "append 0" by the input's parity is
// the selection the document draws; it reduces to this XOR. Combinational.
// Port names and the even-parity sense follow the document.
module golay23_24 (
  input  logic [22:0] g1,
  output logic [23:0] g2
);

  assign g2 = {g1, ^g1};

endmodule
