// Signed N x M LUT-based tree multiplier: p = a * b.
//
// Two stages, both shaped for LUT fabrics with dual 5-input LUT halves:
//   1. booth_ppg recodes b into radix-4 Booth digits and builds the partial
//      product bit heap (about N*M/4 LUTs: two heap bits per LUT);
//   2. compressor_tree reduces the heap with generalized parallel counters
//      in stages and finishes with a quaternary adder.
// The product is exact: a*b always fits N+M bits.
//
// The two-stage structure, the Booth recoding, the two-bits-per-LUT
// partial products and the counter library follow the reference
// architecture. The heap layout, the way counters are chosen and placed,
// the parameter-selected register positions and the valid/reset handshake
// are this design's own.
//
// Pipelining: PIPE_PPG registers the heap after stage 1, bit s of PIPE_MASK
// registers the heap after compression stage s, PIPE_OUT registers the
// product. With the defaults (no registers) the datapath is combinational
// and out_valid = in_valid. The valid bit travels alongside the data through
// the same registers, so the latency is the number of enabled registers.
// Only the valid bits have a reset (rst_n, active low, synchronous).
module booth_mult
  import lutmul_pkg::*;
#(
  parameter int unsigned N         = 16,    // width of a
  parameter int unsigned M         = 16,    // width of b
  parameter bit          PIPE_PPG  = 1'b0,
  parameter logic [31:0] PIPE_MASK = '0,
  parameter bit          PIPE_OUT  = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [N-1:0] a,
  input  logic signed [M-1:0] b,
  output logic               out_valid,
  output logic signed [N+M-1:0] p
);
  localparam int unsigned W    = N + M;
  localparam int unsigned MAXH = max_booth_height(N, M);
  localparam logic [128*PLAN_FW-1:0] HALL = booth_heights(N, M);
  localparam logic [W*PLAN_FW-1:0]   HGT  = HALL[W*PLAN_FW-1:0];

  if (W > 128) begin : g_err_width
    $error("booth_mult: N + M must not exceed 128");
  end

  logic [W-1:0][MAXH-1:0] heap, heap_q;

  booth_ppg #(.N(N), .M(M), .W(W), .MAXH(MAXH)) u_ppg (
    .a(a), .b(b), .heap_o(heap)
  );

  logic vld_q;

  if (PIPE_PPG) begin : g_ppg_reg
    always_ff @(posedge clk) heap_q <= heap;
    always_ff @(posedge clk) begin
      if (!rst_n) vld_q <= 1'b0;
      else        vld_q <= in_valid;
    end
  end else begin : g_ppg_comb
    assign heap_q = heap;
    assign vld_q  = in_valid;
  end

  compressor_tree #(
    .COLS(W), .MAXH(MAXH), .HEIGHTS(HGT),
    .PIPE_MASK(PIPE_MASK), .PIPE_OUT(PIPE_OUT), .OW(W)
  ) u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(vld_q), .heap_i(heap_q),
    .out_valid(out_valid), .sum_o(p)
  );
endmodule
