// (2, 5 : 1, 2, 1) counter: five bits of weight 1 and two of weight 2 in;
// one bit of weight 1, two of weight 2 and one of weight 4 out
// (maximum 5 + 4 = 9 = 1 + 2*2 + 4).
//
// Weight-1 LUT: FA1(x0[0..2]) -> (u, k1), FA2(u, x0[3], x0[4]) -> (y0, k2).
// Weight-2 LUT: FA3(k1, x1[0], x1[1]) -> (y1b, y2). The second weight-2
// output is the carry k2 of FA2 (y1a). In the dual-rail ripple-sum counter
// y0 and y1b are the signals passed to the next cell over the LUT cascade
// path. Combinational.
module gpc_2_5_1_2_1 (
  input  logic [4:0] x0,   // weight 1
  input  logic [1:0] x1,   // weight 2
  output logic       y0,   // weight 1
  output logic       y1a,  // weight 2, carry of the weight-1 LUT
  output logic       y1b,  // weight 2, sum of the weight-2 LUT
  output logic       y2    // weight 4
);
  logic u, k1;

  gpc_3_2 u_fa1 (.x(x0[2:0]),       .s(u),   .c(k1));
  gpc_3_2 u_fa2 (.x({x0[4:3], u}),  .s(y0),  .c(y1a));
  gpc_3_2 u_fa3 (.x({x1, k1}),      .s(y1b), .c(y2));
endmodule
