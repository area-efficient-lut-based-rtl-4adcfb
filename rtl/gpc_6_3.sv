// (6 : 3] counter: counts six bits of weight 1 into a 3-bit result.
// Only its function is given; it is written as a plain population count,
// which maps to three 6-input LUT functions (one per output bit).
// Combinational.
module gpc_6_3 (
  input  logic [5:0] x,  // weight 1
  output logic [2:0] y   // count, y[j] has weight 2^j
);
  always_comb begin
    y = '0;
    for (int i = 0; i < 6; i++) y = y + 3'(x[i]);
  end
endmodule
