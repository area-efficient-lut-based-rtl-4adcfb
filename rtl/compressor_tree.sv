// GPC compressor tree with terminal quaternary adder.
//
// Sums a bit heap: column c holds HEIGHTS[c] bits of weight 2^c, and the
// output is the sum of all of them (modulo 2^OW). The heap is reduced in
// stages. In every stage the columns are scanned from the least significant
// one upward; each column taller than the terminal adder accepts gets
// counters from the library in lutmul_pkg until fewer than three of its bits
// are left, and its leftover bits pass to the next stage unchanged. Counters
// are chosen in this order, taking the first whose condition holds
// (H = height of the column, Hn/Hnn = heights of the next two columns,
// a = bits of the column still free, an/ann = free bits in the next two):
//   (5,17:4,5,1)  a >= 17, an >= 5
//   (4,13:3,4,1)  a >= 13, H >= 16, an >= 4
//   (9:4,1)       a >= 9,  H >= 12, 5H > 17Hn
//   (3,9:2,3,1)   a >= 9,  H >= 12, an >= 3
//   (6:3]         a >= 6,  H == 9, Hn <= 3, Hnn <= 3
//   (2,2,3:4]     5 <= H <= 6, 4 <= Hn <= 5, 4 <= Hnn <= 5, an >= 2, ann >= 2
//   (1,5:3]       a >= 5,  an >= 1
//   (3:2]         a >= 3
// A counter never takes bits that another counter of the same stage took.
// Stages are added until column 0 holds at most 6 bits and every other
// column at most 4; these are then summed by the quaternary adder (rows a..d
// plus two extra weight-1 bits). The whole plan is computed at elaboration
// by constant functions, so the tree is plain wiring between counters.
// The counter library and the height conditions follow the reference
// heuristic; chaining counters into carry-forwarding row counters and the
// merging of the last two stages are not done here, so every counter works
// on its own and the scan advances one column at a time.
//
// Timing: combinational from heap_i to sum_o, except that bit s of
// PIPE_MASK puts a register bank after compression stage s (s < NSTAGES)
// and PIPE_OUT a register after the adder. LATENCY gives the clock cycles.
// A valid bit passes through the same registers as the data, from in_valid
// to out_valid; only these valid registers are reset (rst_n, synchronous).
module compressor_tree
  import lutmul_pkg::*;
#(
  parameter int unsigned COLS = 2,     // columns of the input heap
  parameter int unsigned MAXH = 16,    // tallest input column
  // Height of column c in bits [c*PLAN_FW +: PLAN_FW].
  parameter logic [COLS*PLAN_FW-1:0] HEIGHTS = {COLS{PLAN_FW'(16)}},
  parameter logic [31:0] PIPE_MASK = '0,  // register after stage s
  parameter bit PIPE_OUT = 1'b0,          // register after the adder
  // Output width; the default holds the full sum.
  parameter int unsigned OW = COLS + $clog2(MAXH + 1) + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,      // resets the valid bits only
  input  logic                          in_valid,   // heap_i holds data
  input  logic [COLS-1:0][MAXH-1:0]     heap_i,     // heap_i[c][j]: bit j of column c
  output logic                          out_valid,  // sum_o holds a result
  output logic [OW-1:0]                 sum_o
);
  localparam int unsigned CW    = OW;        // columns kept inside the tree
  localparam int unsigned HW    = MAXH + 8;  // storage per column and stage
  localparam int unsigned MAXS  = 12;        // stage limit of the planner
  localparam int unsigned NF    = NUM_GPC + 1;
  localparam int unsigned PLANW = (MAXS + 1) * CW * NF * PLAN_FW;

  function automatic int target(input int c);
    return (c == 0) ? 6 : 4;
  endfunction

  // Plan entry (s, c, f): f = 0 is the height of column c at the input of
  // stage s, f = 1 + t the number of counters of type t anchored at c.
  function automatic logic [PLANW-1:0] make_plan();
    logic [PLANW-1:0] p;
    int h    [CW];
    int nh   [CW];
    int used [CW + 2];
    int cnt  [CW * NUM_GPC];
    int a, an, ann, hn, hnn;
    gpc_type_e t;
    bit done;
    for (int f = 0; f < int'(PLANW / PLAN_FW); f++) p[f * PLAN_FW +: PLAN_FW] = '0;
    for (int c = 0; c < CW; c++) h[c] = (c < int'(COLS)) ? int'(HEIGHTS[c*PLAN_FW +: PLAN_FW]) : 0;
    for (int s = 0; s <= int'(MAXS); s++) begin
      done = 1'b1;
      for (int c = 0; c < CW; c++) begin
        p[((s * CW + c) * NF) * PLAN_FW +: PLAN_FW] = PLAN_FW'(h[c]);
        if (h[c] > target(c)) done = 1'b0;
      end
      if (done || s == int'(MAXS)) break;
      for (int c = 0; c < CW + 2; c++) used[c] = 0;
      for (int c = 0; c < CW; c++) for (int u = 0; u < NUM_GPC; u++) cnt[c * NUM_GPC + u] = 0;
      for (int c = 0; c < CW; c++) begin
        a   = h[c] - used[c];
        hn  = (c + 1 < CW) ? h[c+1] : 0;
        hnn = (c + 2 < CW) ? h[c+2] : 0;
        if (h[c] > target(c)) begin
          while (a >= 3) begin
            an  = (c + 1 < CW) ? h[c+1] - used[c+1] : 0;
            ann = (c + 2 < CW) ? h[c+2] - used[c+2] : 0;
            if (a >= 17 && an >= 5)                                   t = GPC_5_17;
            else if (a >= 13 && h[c] >= 16 && an >= 4)               t = GPC_4_13;
            else if (a >= 9 && h[c] >= 12 && 5 * h[c] > 17 * hn)     t = GPC_9_4_1;
            else if (a >= 9 && h[c] >= 12 && an >= 3)                t = GPC_3_9;
            else if (a >= 6 && h[c] == 9 && hn <= 3 && hnn <= 3)     t = GPC_6_3;
            else if (h[c] >= 5 && h[c] <= 6 && hn >= 4 && hn <= 5 &&
                     hnn >= 4 && hnn <= 5 && an >= 2 && ann >= 2)    t = GPC_2_2_3_4;
            else if (a >= 5 && an >= 1)                              t = GPC_1_5_3;
            else                                                     t = GPC_3_2;
            cnt[c * NUM_GPC + int'(t)]++;
            a         -= gpc_p(int'(t), 0);
            used[c]   += gpc_p(int'(t), 0);
            used[c+1] += gpc_p(int'(t), 1);
            used[c+2] += gpc_p(int'(t), 2);
          end
        end
      end
      for (int c = 0; c < CW; c++) begin
        nh[c] = h[c] - used[c];
        for (int d = 0; d < 4; d++)
          if (c - d >= 0)
            for (int u = 0; u < NUM_GPC; u++) nh[c] += cnt[(c - d) * NUM_GPC + u] * gpc_q(u, d);
        for (int u = 0; u < NUM_GPC; u++)
          p[((s * CW + c) * NF + 1 + u) * PLAN_FW +: PLAN_FW] = PLAN_FW'(cnt[c * NUM_GPC + u]);
      end
      for (int c = 0; c < CW; c++) h[c] = nh[c];
    end
    return p;
  endfunction

  localparam logic [PLANW-1:0] PLAN = make_plan();

  function automatic int hgt(input int s, input int c);
    if (c < 0 || c >= int'(CW)) return 0;
    return int'(PLAN[((s * CW + c) * NF) * PLAN_FW +: PLAN_FW]);
  endfunction

  function automatic int num(input int s, input int c, input int t);
    if (c < 0 || c >= int'(CW)) return 0;
    return int'(PLAN[((s * CW + c) * NF + 1 + t) * PLAN_FW +: PLAN_FW]);
  endfunction

  function automatic int num_stages();
    for (int s = 0; s <= int'(MAXS); s++) begin
      automatic bit done = 1'b1;
      for (int c = 0; c < CW; c++) if (hgt(s, c) > target(c)) done = 1'b0;
      if (done) return s;
    end
    return MAXS + 1;
  endfunction

  function automatic int max_height();
    int m = 0;
    for (int s = 0; s <= int'(MAXS); s++)
      for (int c = 0; c < CW; c++) if (hgt(s, c) > m) m = hgt(s, c);
    return m;
  endfunction

  // Bits of column c taken by counters anchored at c - d, d = 1 or 2, and by
  // the counters anchored at c itself.
  function automatic int taken_from(input int s, input int c, input int d);
    int n = 0;
    for (int u = 0; u < NUM_GPC; u++) n += num(s, c - d, u) * gpc_p(u, d);
    return n;
  endfunction

  function automatic int pass_base(input int s, input int c);
    return taken_from(s, c, 2) + taken_from(s, c, 1) + taken_from(s, c, 0);
  endfunction

  // First bit, in column c + d, of the inputs of counter k of type t at c.
  function automatic int in_off(input int s, input int c, input int t, input int k, input int d);
    int o = 0;
    if (d == 0) o = taken_from(s, c, 2) + taken_from(s, c, 1);
    if (d == 1) o = taken_from(s, c + 1, 2);
    for (int u = 0; u < t; u++) o += num(s, c, u) * gpc_p(u, d);
    return o + k * gpc_p(t, d);
  endfunction

  // First bit, in column c + d of the next stage, of output group d of
  // counter k of type t at c. Order in a column: passed bits, then outputs
  // of counters anchored 0, 1, 2, 3 columns below.
  function automatic int out_off(input int s, input int c, input int t, input int k, input int d);
    int o;
    o = hgt(s, c + d) - pass_base(s, c + d);
    for (int e = 0; e < d; e++)
      for (int u = 0; u < NUM_GPC; u++) o += num(s, c + d - e, u) * gpc_q(u, e);
    for (int u = 0; u < t; u++) o += num(s, c, u) * gpc_q(u, d);
    return o + k * gpc_q(t, d);
  endfunction

  localparam int unsigned NSTAGES = num_stages();
  localparam int unsigned LATENCY = $countones(PIPE_MASK & ((32'd1 << NSTAGES) - 1)) + 32'(PIPE_OUT);

  if (NSTAGES > MAXS) begin : g_err_converge
    $error("compressor_tree: heap does not reduce within %0d stages", MAXS);
  end
  if (max_height() > int'(HW)) begin : g_err_height
    $error("compressor_tree: a column grows beyond its storage");
  end
  if (OW < 2) begin : g_err_width
    $error("compressor_tree: OW must be at least 2");
  end

  // g_lvl[s].hp is the heap at the input of compression stage s; level
  // NSTAGES feeds the adder. g_lvl[s].hn is the output of stage s and hq the
  // same after the optional register.
  for (genvar s = 0; s <= NSTAGES; s++) begin : g_lvl
    logic [HW-1:0] hp [CW];
    logic          vld;
    logic [HW-1:0] hq [CW];
    logic          vq;

    if (s == 0) begin : g_src
      for (genvar c = 0; c < CW; c++) begin : g_in
        if (c < COLS) begin : g_used
          assign hp[c] = HW'(heap_i[c]);
        end else begin : g_empty
          assign hp[c] = '0;
        end
      end
      assign vld = in_valid;
    end else begin : g_src
      assign hp  = g_lvl[s-1].hq;
      assign vld = g_lvl[s-1].vq;
    end

    if (s < NSTAGES) begin : g_stage
      logic [HW-1:0] hn [CW];
      for (genvar c = 0; c < CW; c++) begin : g_col
        localparam int PB = pass_base(s, c);
        localparam int NP = hgt(s, c) - PB;
        localparam int HNEXT = hgt(s + 1, c);
        for (genvar j = 0; j < NP; j++) begin : g_pass
          assign hn[c][j] = hp[c][PB + j];
        end
        for (genvar j = HNEXT; j < HW; j++) begin : g_zero
          assign hn[c][j] = 1'b0;
        end
        for (genvar t = 0; t < NUM_GPC; t++) begin : g_type
          localparam int CNT = num(s, c, t);
          for (genvar k = 0; k < CNT; k++) begin : g_gpc
            localparam int I0 = in_off(s, c, t, k, 0);
            localparam int I1 = in_off(s, c, t, k, 1);
            localparam int I2 = in_off(s, c, t, k, 2);
            localparam int O0 = out_off(s, c, t, k, 0);
            localparam int O1 = out_off(s, c, t, k, 1);
            localparam int O2 = out_off(s, c, t, k, 2);
            localparam int O3 = out_off(s, c, t, k, 3);
            localparam int P0 = gpc_p(t, 0);
            localparam int P1 = gpc_p(t, 1);
            localparam int P2 = gpc_p(t, 2);
            localparam int Q1 = gpc_q(t, 1);
            localparam int Q2 = gpc_q(t, 2);
            localparam int Q3 = gpc_q(t, 3);
            logic [GPC_MAX_P0-1:0] x0;
            logic [GPC_MAX_P1-1:0] x1;
            logic [GPC_MAX_P2-1:0] x2;
            logic                  y0, y3;
            logic [GPC_MAX_Q1-1:0] y1;
            logic [GPC_MAX_Q2-1:0] y2;
            for (genvar i = 0; i < GPC_MAX_P0; i++) begin : g_x0
              if (i < P0) begin : g_b
                assign x0[i] = hp[c][I0 + i];
              end else begin : g_z
                assign x0[i] = 1'b0;
              end
            end
            for (genvar i = 0; i < GPC_MAX_P1; i++) begin : g_x1
              if (i < P1) begin : g_b
                assign x1[i] = hp[c+1][I1 + i];
              end else begin : g_z
                assign x1[i] = 1'b0;
              end
            end
            for (genvar i = 0; i < GPC_MAX_P2; i++) begin : g_x2
              if (i < P2) begin : g_b
                assign x2[i] = hp[c+2][I2 + i];
              end else begin : g_z
                assign x2[i] = 1'b0;
              end
            end
            gpc_cell #(.TYPE(gpc_type_e'(t))) u_gpc (
              .x0(x0), .x1(x1), .x2(x2), .y0(y0), .y1(y1), .y2(y2), .y3(y3)
            );
            assign hn[c][O0] = y0;
            for (genvar i = 0; i < Q1; i++) begin : g_y1
              if (c + 1 < CW) begin : g_b
                assign hn[c+1][O1 + i] = y1[i];
              end
            end
            for (genvar i = 0; i < Q2; i++) begin : g_y2
              if (c + 2 < CW) begin : g_b
                assign hn[c+2][O2 + i] = y2[i];
              end
            end
            if (Q3 > 0 && c + 3 < CW) begin : g_y3
              assign hn[c+3][O3] = y3;
            end
          end
        end
      end
    end

    if (s < NSTAGES && PIPE_MASK[s]) begin : g_reg
      always_ff @(posedge clk) hq <= g_stage.hn;
      always_ff @(posedge clk) begin
        if (!rst_n) vq <= 1'b0;
        else        vq <= vld;
      end
    end else if (s < NSTAGES) begin : g_comb
      assign hq = g_stage.hn;
      assign vq = vld;
    end else begin : g_last
      for (genvar c = 0; c < CW; c++) begin : g_c
        assign hq[c] = '0;
      end
      assign vq = 1'b0;
    end
  end

  // Terminal addition.
  logic [CW-1:0] row [4];
  logic          e0, e1;
  logic [CW-1:0] sum;

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < CW; c++) begin : g_bit
      if (r < hgt(NSTAGES, c)) begin : g_b
        assign row[r][c] = g_lvl[NSTAGES].hp[c][r];
      end else begin : g_z
        assign row[r][c] = 1'b0;
      end
    end
  end
  if (hgt(NSTAGES, 0) > 4) begin : g_e0
    assign e0 = g_lvl[NSTAGES].hp[0][4];
  end else begin : g_e0z
    assign e0 = 1'b0;
  end
  if (hgt(NSTAGES, 0) > 5) begin : g_e1
    assign e1 = g_lvl[NSTAGES].hp[0][5];
  end else begin : g_e1z
    assign e1 = 1'b0;
  end

  quaternary_adder #(.W(CW)) u_qadd (
    .a(row[0]), .b(row[1]), .c(row[2]), .d(row[3]), .e0(e0), .e1(e1), .sum(sum)
  );

  if (PIPE_OUT) begin : g_out_reg
    always_ff @(posedge clk) sum_o <= sum;
    always_ff @(posedge clk) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= g_lvl[NSTAGES].vld;
    end
  end else begin : g_out_comb
    assign sum_o     = sum;
    assign out_valid = g_lvl[NSTAGES].vld;
  end
endmodule
