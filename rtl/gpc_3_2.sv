// (3 : 2] counter: a full adder. Three bits of weight 1 in, a sum bit of
// weight 1 and a carry bit of weight 2 out. On the target fabric it fits one
// LUT and is compatible with the carry-lookahead chain. Combinational.
module gpc_3_2 (
  input  logic [2:0] x,  // three bits of equal weight
  output logic       s,  // weight 1
  output logic       c   // weight 2
);
  always_comb begin
    s = x[0] ^ x[1] ^ x[2];
    c = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
  end
endmodule
