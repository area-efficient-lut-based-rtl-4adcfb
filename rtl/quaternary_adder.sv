// Terminal quaternary adder: sum = a + b + c + d + e0 + e1 (mod 2^W).
//
// Built as two layers of carry-chained row counters. In the first layer
// every column i puts a_i, b_i, c_i through a full adder; the full-adder
// sums are added to row d along one carry chain (carry-in e0), and the
// full-adder carries, one column up, form a second row. The second layer is
// another carry chain adding the first layer's result and that carry row,
// with e1 in the free weight-1 slot of the carry row. Each carry chain is
// written as a '+' so that synthesis maps it onto the fabric's carry logic.
// The two-layer arrangement follows the reference adder; the split of work
// between the layers and the place of e1 are this design's choice.
// Combinational.
module quaternary_adder #(
  parameter int unsigned W = 32  // width of the rows and of the sum
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic         e0,   // extra bit of weight 1
  input  logic         e1,   // extra bit of weight 1
  output logic [W-1:0] sum
);
  logic [W-1:0] fa_s, fa_c;   // full-adder sums and carries per column
  logic [W-1:0] row1;         // first carry chain
  logic [W-1:0] carry_row;    // carries moved one column up, e1 at bit 0

  for (genvar i = 0; i < W; i++) begin : g_col
    gpc_3_2 u_fa (.x({c[i], b[i], a[i]}), .s(fa_s[i]), .c(fa_c[i]));
  end

  always_comb begin
    row1      = fa_s + d + W'(e0);
    carry_row = {fa_c[W-2:0], e1};
    sum       = row1 + carry_row;
  end
endmodule
