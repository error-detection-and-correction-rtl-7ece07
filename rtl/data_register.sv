// data_register: the word register between the cache array, the encoder
// and the decoder (as wide as a cache row, 23 bits).
//
// On a write the encoded word (load_enc) is captured and then written into
// the array; on a read the array output (load_mem) is captured and fed to
// the decoder. Rising-edge register, synchronous active-high reset to zero;
// if both loads are high the array word wins. The document draws a two-way
// path to the array; here the two directions are a select in front of one
// register, which is this design's choice.
module data_register #(
  parameter int unsigned WIDTH = 23
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             load_enc,
  input  logic             load_mem,
  input  logic [WIDTH-1:0] enc_in,
  input  logic [WIDTH-1:0] mem_in,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (reset)         q <= '0;
    else if (load_mem) q <= mem_in;
    else if (load_enc) q <= enc_in;
  end

endmodule
