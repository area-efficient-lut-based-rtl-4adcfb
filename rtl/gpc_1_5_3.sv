// (1, 5 : 3] counter: five bits of weight 1 and one bit of weight 2 are
// counted into a 3-bit result (maximum 5 + 2 = 7).
//
// Two LUTs, as in the published structure: the lower LUT holds two full
// adders, FA1(a0,b0,c0) and FA2(sum1,d0,e0), and delivers y[0]. Its carry k2
// reaches the upper LUT over the LUT cascade path. The upper LUT recomputes
// the carry k1 of FA1 and adds k1 + a1 + k2 in a third full adder, giving
// y[1] and y[2]. Combinational.
module gpc_1_5_3 (
  input  logic [4:0] x0,  // a0..e0, weight 1
  input  logic       x1,  // a1, weight 2
  output logic [2:0] y    // count, y[j] has weight 2^j
);
  logic s1, k1, k2;

  gpc_3_2 u_fa1 (.x(x0[2:0]),          .s(s1),   .c(k1));
  gpc_3_2 u_fa2 (.x({x0[4:3], s1}),    .s(y[0]), .c(k2));
  gpc_3_2 u_fa3 (.x({k2, x1, k1}),     .s(y[1]), .c(y[2]));
endmodule
