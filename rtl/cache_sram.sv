// cache_sram: the protected cache array, DEPTH words of WIDTH bits
// (1K x 23 by default, one (23,12) Golay codeword per row).
//
// Single port, active on the falling clock edge as the document shows. On a
// falling edge with write high, wdata is stored at addr; with read high (and
// write low) the word at addr is copied to the rdata register, which holds
// its value until the next read. Reset (synchronous, sampled on the falling
// edge) clears rdata only; the array itself has no reset, as in an SRAM.
// Written as an array so synthesis can map it to a RAM macro.
// Size and port set follow the document; the priority of write over read
// and the effect of reset are this design's choices.
module cache_sram #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DEPTH  = 1024,
  parameter int unsigned WIDTH  = 23
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              read,
  input  logic              write,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(negedge clk) begin
    if (write) mem[addr] <= wdata;
  end

  always_ff @(negedge clk) begin
    if (reset)              rdata <= '0;
    else if (read && !write) rdata <= mem[addr];
  end

endmodule
