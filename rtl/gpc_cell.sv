// One counter of the compressor tree, selected by a parameter.
//
// Gives every counter of the library the same ports so that the tree can
// place any of them: x0/x1/x2 are the bits taken from the anchor column and
// the two columns above it, y0..y3 the bits put into the anchor column and
// the three above. Ports wider than the selected counter needs are ignored
// (inputs) or driven to 0 (outputs). Combinational.
module gpc_cell
  import lutmul_pkg::*;
#(
  parameter gpc_type_e TYPE = GPC_1_5_3
) (
  input  logic [GPC_MAX_P0-1:0] x0,
  input  logic [GPC_MAX_P1-1:0] x1,
  input  logic [GPC_MAX_P2-1:0] x2,
  output logic                  y0,
  output logic [GPC_MAX_Q1-1:0] y1,
  output logic [GPC_MAX_Q2-1:0] y2,
  output logic                  y3
);
  case (TYPE)
    GPC_3_2: begin : g_3_2
      gpc_3_2 u (.x(x0[2:0]), .s(y0), .c(y1[0]));
      assign y1[GPC_MAX_Q1-1:1] = '0;
      assign y2 = '0;
      assign y3 = 1'b0;
    end
    GPC_1_5_3: begin : g_1_5_3
      logic [2:0] y;
      gpc_1_5_3 u (.x0(x0[4:0]), .x1(x1[0]), .y(y));
      assign y0 = y[0];
      assign y1 = {{(GPC_MAX_Q1-1){1'b0}}, y[1]};
      assign y2 = {{(GPC_MAX_Q2-1){1'b0}}, y[2]};
      assign y3 = 1'b0;
    end
    GPC_3_9, GPC_4_13, GPC_5_17: begin : g_dual
      localparam int unsigned N = (TYPE == GPC_3_9) ? 2 : (TYPE == GPC_4_13) ? 3 : 4;
      logic [N:0]   q1;
      logic [N-1:0] q2;
      gpc_dual_rail #(.N(N)) u (.x0(x0[4*N:0]), .x1(x1[N:0]), .y0(y0), .y1(q1), .y2(q2));
      assign y1 = GPC_MAX_Q1'(q1);
      assign y2 = GPC_MAX_Q2'(q2);
      assign y3 = 1'b0;
    end
    GPC_9_4_1: begin : g_9_4_1
      logic [3:0] q1;
      gpc_ripple_sum #(.N(4)) u (.x(x0[8:0]), .y0(y0), .y1(q1));
      assign y1 = GPC_MAX_Q1'(q1);
      assign y2 = '0;
      assign y3 = 1'b0;
    end
    GPC_6_3: begin : g_6_3
      logic [2:0] y;
      gpc_6_3 u (.x(x0[5:0]), .y(y));
      assign y0 = y[0];
      assign y1 = {{(GPC_MAX_Q1-1){1'b0}}, y[1]};
      assign y2 = {{(GPC_MAX_Q2-1){1'b0}}, y[2]};
      assign y3 = 1'b0;
    end
    default: begin : g_2_2_3_4
      logic [3:0] y;
      gpc_2_2_3_4 u (.x0(x0[2:0]), .x1(x1[1:0]), .x2(x2[1:0]), .y(y));
      assign y0 = y[0];
      assign y1 = {{(GPC_MAX_Q1-1){1'b0}}, y[1]};
      assign y2 = {{(GPC_MAX_Q2-1){1'b0}}, y[2]};
      assign y3 = y[3];
    end
  endcase
endmodule
