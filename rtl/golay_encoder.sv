// golay_encoder: Golay encoder for 12-bit messages.
//
// Two stages, as the document divides it: a crc block generates the (23,12)
// codeword (message followed by 11 CRC check bits of the generator
// polynomial GOLAY_POLY), and golay23_24 extends it to the (24,12) code with
// an even-parity bit. Both outputs are combinational in the same cycle.
// The generator polynomial value is this design's choice (see golay_pkg).
module golay_encoder
  import golay_pkg::*;
#(
  parameter logic [11:0] GOLAY_POLY = GOLAY_POLY_DEFAULT
) (
  input  logic [11:0] msg,
  output logic [22:0] code23,
  output logic [23:0] code24
);

  crc u_crc (
    .m           (msg),
    .p           (GOLAY_POLY),
    .transoutput (code23)
  );

  golay23_24 u_ext (
    .g1 (code23),
    .g2 (code24)
  );

endmodule
