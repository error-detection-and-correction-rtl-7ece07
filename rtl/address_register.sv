// address_register: holds the cache row address of the current access
// (10 bits for 1024 rows, as in the document).
//
// Rising-edge register with a load enable and synchronous active-high reset
// to row 0. The address is captured in the cycle a read or write is
// requested and drives the cache array on the following falling edge.
module address_register #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              load,
  input  logic [ADDR_W-1:0] addr_in,
  output logic [ADDR_W-1:0] addr_q
);

  always_ff @(posedge clk) begin
    if (reset)     addr_q <= '0;
    else if (load) addr_q <= addr_in;
  end

endmodule
