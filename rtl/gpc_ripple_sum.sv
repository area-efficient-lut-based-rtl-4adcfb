// Ripple-sum column counter (2N+1 : N, 1).
//
// A chain of N (3 : 2] cells in one column. The first cell adds three input
// bits; every later cell adds two new bits to the sum of the cell below,
// which travels on the LUT cascade path. Each cell's carry is an output of
// weight 2; the last sum is the weight-1 output. N = 4 gives the (9 : 4, 1)
// counter of the compressor tree. Combinational, N cells deep.
module gpc_ripple_sum #(
  parameter int unsigned N = 4  // number of cells; 4 gives (9 : 4, 1)
) (
  input  logic [2*N:0]  x,   // weight 1
  output logic          y0,  // weight 1
  output logic [N-1:0]  y1   // weight 2
);
  logic [N-1:0] r;  // rippled sums

  for (genvar k = 0; k < N; k++) begin : g_cell
    logic [2:0] c_x;
    if (k == 0) begin : g_first
      assign c_x = x[2:0];
    end else begin : g_next
      assign c_x = {x[2*k+2 -: 2], r[k-1]};
    end
    gpc_3_2 u_fa (.x(c_x), .s(r[k]), .c(y1[k]));
  end

  assign y0 = r[N-1];
endmodule
