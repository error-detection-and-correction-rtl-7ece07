// weight_unit: counts the ones in a 12-bit vector (Hamming weight).
//
// The adder tree follows the document: four full adders each take three
// consecutive input bits and give a 2-bit count {carry, sum}; two 2-bit
// adders combine pairs of these into 3-bit counts; one 3-bit adder gives the
// 4-bit weight (0..12). Combinational; one tree per instance. The decoder
// uses it to test candidate error patterns for weight <= 3 or <= 2.
module weight_unit (
  input  logic [11:0] v,
  output logic [3:0]  w
);

  logic [1:0] fa [4];   // full-adder outputs {carry, sum}
  logic [2:0] add2 [2]; // 2-bit adder outputs

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      fa[i][0] = v[3*i] ^ v[3*i+1] ^ v[3*i+2];
      fa[i][1] = (v[3*i] & v[3*i+1]) | (v[3*i+2] & (v[3*i] ^ v[3*i+1]));
    end
    for (int j = 0; j < 2; j++)
      add2[j] = {1'b0, fa[2*j]} + {1'b0, fa[2*j+1]};
    w = {1'b0, add2[0]} + {1'b0, add2[1]};
  end

endmodule
