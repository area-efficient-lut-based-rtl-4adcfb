// (2, 2, 3 : 4] counter: three bits of weight 1, two of weight 2 and two of
// weight 4 in, a 4-bit weighted sum out (maximum 3 + 4 + 8 = 15).
// Only its function is given; it is written as a weighted sum.
// Combinational.
module gpc_2_2_3_4 (
  input  logic [2:0] x0,  // weight 1
  input  logic [1:0] x1,  // weight 2
  input  logic [1:0] x2,  // weight 4
  output logic [3:0] y    // y[j] has weight 2^j
);
  always_comb begin
    y = 4'(x0[0]) + 4'(x0[1]) + 4'(x0[2])
      + (4'(x1[0]) << 1) + (4'(x1[1]) << 1)
      + (4'(x2[0]) << 2) + (4'(x2[1]) << 2);
  end
endmodule
