// golay_pkg: constants and elaboration-time helpers shared by the Golay
// encoder and decoder.
//
// The (23,12) binary Golay code is cyclic with an 11th-degree generator
// polynomial. A codeword is systematic: the 12 message bits followed by the
// 11-bit remainder of m(x)*x^11 divided by g(x) (a CRC). The extended
// (24,12) code appends one overall parity bit. Which of the two standard
// generators is used is this design's choice: g(x) = x^11 + x^10 + x^6 + x^5
// + x^4 + x^2 + 1, written as 12 coefficients, x^11 at bit 11.
//
// Bit layout of a 24-bit extended word used throughout:
//   [23:12] message m[11:0]   (m[11] is the x^22 coefficient)
//   [11:1]  check bits        (remainder, x^10 coefficient at bit 11)
//   [0]     overall parity    (even weight for a codeword)
package golay_pkg;

  localparam int unsigned K      = 12;  // message bits
  localparam int unsigned N23    = 23;  // (23,12) code length
  localparam int unsigned N24    = 24;  // extended code length
  localparam int unsigned R      = 11;  // CRC check bits

  localparam logic [11:0] GOLAY_POLY_DEFAULT = 12'hC75;

  typedef logic [K-1:0]   msg_t;
  typedef logic [N23-1:0] code23_t;
  typedef logic [N24-1:0] code24_t;
  typedef logic [K-1:0]   mat_row_t;
  typedef mat_row_t [K-1:0] mat12_t;

  // Remainder of (m(x) * x^11) mod p(x), as 12 conditional-XOR division steps.
  function automatic logic [R-1:0] crc_rem(input msg_t m, input logic [11:0] p);
    logic [22:0] v;
    v = {m, {R{1'b0}}};
    for (int i = 22; i >= 11; i--) begin
      if (v[i]) v[i -: 12] = v[i -: 12] ^ p;
    end
    return v[R-1:0];
  endfunction

  // 12x12 parity part A of the systematic extended code: codeword = [m, m*A].
  // Row i is the 12 parity bits (11 check bits and the overall parity bit) of
  // the codeword for the message with only bit i set.
  function automatic mat12_t parity_matrix(input logic [11:0] p);
    mat12_t a;
    logic [R-1:0] rm;
    for (int i = 0; i < K; i++) begin
      rm   = crc_rem(msg_t'(1) << i, p);
      a[i] = {rm, ~(^rm)};
    end
    return a;
  endfunction

  // Transpose of a 12x12 bit matrix.
  function automatic mat12_t transpose12(input mat12_t a);
    mat12_t t;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        t[j][i] = a[i][j];
    return t;
  endfunction

endpackage
