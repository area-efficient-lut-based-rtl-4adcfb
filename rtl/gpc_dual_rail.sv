// Dual-rail ripple-sum column counter (N+1, 4N+1 : N, N+1, 1).
//
// A chain of N (2, 5 : 1, 2, 1) cells. The first cell takes five bits of
// weight 1 and two of weight 2. Every later cell takes four new weight-1
// bits plus the weight-1 sum of the cell below, and one new weight-2 bit
// plus the weight-2 sum of the cell below: both sums ripple up the chain
// (the two "rails", carried on the LUT cascade path). Each cell emits its
// weight-2 carry and its weight-4 bit; the last cell also emits its two
// sums. N = 2, 3, 4 give the (3,9:2,3,1), (4,13:3,4,1) and (5,17:4,5,1)
// counters of the compressor tree. Combinational, N cells deep.
module gpc_dual_rail #(
  parameter int unsigned N = 2  // number of cells; 2 gives (3, 9 : 2, 3, 1)
) (
  input  logic [4*N:0]   x0,  // weight 1
  input  logic [N:0]     x1,  // weight 2
  output logic           y0,  // weight 1
  output logic [N:0]     y1,  // weight 2
  output logic [N-1:0]   y2   // weight 4
);
  logic [N-1:0] r0, r1;  // rippled weight-1 and weight-2 sums

  for (genvar k = 0; k < N; k++) begin : g_cell
    logic [4:0] c_x0;
    logic [1:0] c_x1;
    if (k == 0) begin : g_first
      assign c_x0 = x0[4:0];
      assign c_x1 = x1[1:0];
    end else begin : g_next
      assign c_x0 = {x0[4*k+4 -: 4], r0[k-1]};
      assign c_x1 = {x1[k+1], r1[k-1]};
    end
    gpc_2_5_1_2_1 u_cell (
      .x0(c_x0), .x1(c_x1),
      .y0(r0[k]), .y1a(y1[k]), .y1b(r1[k]), .y2(y2[k])
    );
  end

  assign y0    = r0[N-1];
  assign y1[N] = r1[N-1];
endmodule
