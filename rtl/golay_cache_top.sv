// golay_cache_top: a cache memory protected by the binary Golay code.
//
// Data path: a 12-bit message is encoded by golay_encoder (CRC check bits
// of the (23,12) Golay code, then extended with a parity bit to (24,12));
// the 23-bit codeword goes through the data register into one row of the
// 1K x 23 cache_sram, addressed by the address register. On a read the row
// comes back through the data register, is extended to 24 bits again and is
// decoded by golay_decoder, which corrects up to three wrong bits.
//
// Timing (clk): a request (write or read, with addr and data_in) is taken on
// a rising edge while ready is high. The address and data registers load on
// that edge, and the array acts on the following falling edge (the array is
// clocked on the falling edge, as in the document). A write is then done.
// For a read, the array word is loaded into the data register on the next
// rising edge; rd_valid is high for that one cycle, with data_out and the
// error flags valid, and ready is low in the cycle between, so a read takes
// two cycles and a write one. data_out and the flags keep decoding the data
// register until it is loaded again.
//
// Read-path extension: the array holds the 23-bit code, the decoder takes
// 24 bits. The parity bit added on the read path is the complement of the
// even-parity bit that golay23_24 produces, so the 24-bit word has odd
// weight: 1, 2 or 3 wrong stored bits then give 1, 3 or 3 wrong bits in 24,
// all within the decoder's reach. (With even parity, three stored errors
// would become four.) A correction of the added bit alone is not reported:
// err_detected, err_corrected and err_weight describe the 23 stored bits.
// Since the (23,12) code is perfect, every 23-bit word lies within three
// bits of a codeword, so err_uncorrectable stays low on this path and four
// or more stored errors are miscorrected without a flag. This extension and the request handshake are this
// design's choices; the document gives the blocks and their connection.
//
// err_inject flips the chosen codeword bits on their way into the array: a
// model of soft errors for testing. Tie it to zero in use.
// code24 shows the extended codeword of data_in (combinational).
module golay_cache_top
  import golay_pkg::*;
#(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DEPTH  = 1024
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              read,
  input  logic              write,
  input  logic [ADDR_W-1:0] addr,
  input  logic [11:0]       data_in,
  input  logic [22:0]       err_inject,
  output logic              ready,
  output logic [23:0]       code24,
  output logic [11:0]       data_out,
  output logic              rd_valid,
  output logic              err_detected,
  output logic              err_corrected,
  output logic              err_uncorrectable,
  output logic [2:0]        err_weight
);

  logic [22:0]       code23;
  logic [ADDR_W-1:0] addr_q;
  logic [22:0]       data_q;
  logic [22:0]       sram_rdata;
  logic              wr_q, rd_q;
  logic              take_wr, take_rd;
  logic [23:0]       even24;
  logic [23:0]       dec_in;
  logic [23:0]       dec_code;
  logic [2:0]        dec_weight;
  logic              dec_detected, dec_corrected, par_fixed;

  assign ready   = !rd_q;
  assign take_wr = ready && write;
  assign take_rd = ready && read && !write;

  golay_encoder #(.GOLAY_POLY(GOLAY_POLY_DEFAULT)) u_enc (
    .msg    (data_in),
    .code23 (code23),
    .code24 (code24)
  );

  address_register #(.ADDR_W(ADDR_W)) u_addr_reg (
    .clk     (clk),
    .reset   (reset),
    .load    (take_wr || take_rd),
    .addr_in (addr),
    .addr_q  (addr_q)
  );

  data_register #(.WIDTH(23)) u_data_reg (
    .clk      (clk),
    .reset    (reset),
    .load_enc (take_wr),
    .load_mem (rd_q),
    .enc_in   (code23 ^ err_inject),
    .mem_in   (sram_rdata),
    .q        (data_q)
  );

  // Request strobes for the array, presented on its falling edge.
  always_ff @(posedge clk) begin
    if (reset) begin
      wr_q     <= 1'b0;
      rd_q     <= 1'b0;
      rd_valid <= 1'b0;
    end else begin
      wr_q     <= take_wr;
      rd_q     <= take_rd;
      rd_valid <= rd_q;
    end
  end

  cache_sram #(.ADDR_W(ADDR_W), .DEPTH(DEPTH), .WIDTH(23)) u_sram (
    .clk   (clk),
    .reset (reset),
    .read  (rd_q),
    .write (wr_q),
    .addr  (addr_q),
    .wdata (data_q),
    .rdata (sram_rdata)
  );

  golay23_24 u_rd_ext (
    .g1 (data_q),
    .g2 (even24)
  );

  assign dec_in = {even24[23:1], ~even24[0]};

  golay_decoder #(.GOLAY_POLY(GOLAY_POLY_DEFAULT)) u_dec (
    .r                 (dec_in),
    .msg               (data_out),
    .err_detected      (dec_detected),
    .err_corrected     (dec_corrected),
    .err_uncorrectable (err_uncorrectable),
    .err_weight        (dec_weight),
    .code_out          (dec_code)
  );

  // The added bit is not stored: a correction of it is not an error of the
  // stored word, so it is taken out of the flags and the count.
  assign par_fixed     = dec_code[0] ^ dec_in[0];
  assign err_weight    = dec_weight - {2'b0, par_fixed};
  assign err_detected  = dec_detected && (err_weight != 3'd0);
  assign err_corrected = dec_corrected && (err_weight != 3'd0);

endmodule
