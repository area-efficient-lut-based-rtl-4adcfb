// Shared types and constants of the Booth/GPC tree multiplier.
//
// The compressor tree is built from a fixed library of generalized parallel
// counters (GPCs). A GPC (p2, p1, p0 : ...) takes p0 bits of the column it is
// anchored at, p1 bits of the next column and p2 bits of the one after, and
// puts q0..q3 bits into the anchor column and the three columns above it.
// The library is the counter set of the compression heuristic:
// (3:2], (1,5:3], (3,9:2,3,1), (4,13:3,4,1), (5,17:4,5,1), (9:4,1), (6:3],
// (2,2,3:4]. The shape tables below are those counters' signatures.
package lutmul_pkg;

  typedef enum logic [2:0] {
    GPC_3_2     = 3'd0,  // (3 : 2]            full adder
    GPC_1_5_3   = 3'd1,  // (1, 5 : 3]
    GPC_3_9     = 3'd2,  // (3, 9 : 2, 3, 1)    dual-rail, N = 2
    GPC_4_13    = 3'd3,  // (4, 13 : 3, 4, 1)   dual-rail, N = 3
    GPC_5_17    = 3'd4,  // (5, 17 : 4, 5, 1)   dual-rail, N = 4
    GPC_9_4_1   = 3'd5,  // (9 : 4, 1)          ripple-sum, N = 4
    GPC_6_3     = 3'd6,  // (6 : 3]
    GPC_2_2_3_4 = 3'd7   // (2, 2, 3 : 4]
  } gpc_type_e;

  localparam int unsigned NUM_GPC = 8;

  // Widest port of any counter, per column.
  localparam int unsigned GPC_MAX_P0 = 17;
  localparam int unsigned GPC_MAX_P1 = 5;
  localparam int unsigned GPC_MAX_P2 = 2;
  localparam int unsigned GPC_MAX_Q1 = 5;
  localparam int unsigned GPC_MAX_Q2 = 4;

  // Field width of one entry of a compression plan (heights and counts).
  localparam int unsigned PLAN_FW = 16;

  // Input bits taken from the anchor column (p0), the next (p1), and the
  // one after (p2).
  function automatic int gpc_p(input int t, input int d);
    case (t)
      0: return (d == 0) ? 3  : 0;
      1: return (d == 0) ? 5  : (d == 1) ? 1 : 0;
      2: return (d == 0) ? 9  : (d == 1) ? 3 : 0;
      3: return (d == 0) ? 13 : (d == 1) ? 4 : 0;
      4: return (d == 0) ? 17 : (d == 1) ? 5 : 0;
      5: return (d == 0) ? 9  : 0;
      6: return (d == 0) ? 6  : 0;
      7: return (d == 0) ? 3  : (d == 1) ? 2 : (d == 2) ? 2 : 0;
      default: return 0;
    endcase
  endfunction

  // Output bits put into the anchor column + d, d = 0..3.
  function automatic int gpc_q(input int t, input int d);
    case (t)
      0: return (d <= 1) ? 1 : 0;
      1: return (d <= 2) ? 1 : 0;
      2: return (d == 0) ? 1 : (d == 1) ? 3 : (d == 2) ? 2 : 0;
      3: return (d == 0) ? 1 : (d == 1) ? 4 : (d == 2) ? 3 : 0;
      4: return (d == 0) ? 1 : (d == 1) ? 5 : (d == 2) ? 4 : 0;
      5: return (d == 0) ? 1 : (d == 1) ? 4 : 0;
      6: return (d <= 2) ? 1 : 0;
      7: return 1;
      default: return 0;
    endcase
  endfunction

  // Shape of the radix-4 Booth bit heap of a signed N x M product (M is
  // sign-extended to an even width). Digit i contributes bits of weight
  // 2^(2i) .. 2^(2i+N) and a negation carry c_i of weight 2^(2i). The sign
  // bit of every partial product is inverted and the constant
  // -sum_i 2^(2i+N) (mod 2^(N+M)) is added as extra bits. The heap has
  // N + M columns; the product is its sum modulo 2^(N+M).
  function automatic int booth_digits(input int m);
    return (m + 1) / 2;
  endfunction

  function automatic logic [127:0] booth_const(input int n, input int m);
    logic [127:0] k;
    k = '0;
    for (int i = 0; i < booth_digits(m); i++) k = k - (128'd1 << (2 * i + n));
    return k;
  endfunction

  // Number of heap bits in column c (0 <= c < n + 2*digits).
  function automatic int booth_height(input int n, input int m, input int c);
    int h;
    logic [127:0] k;
    h = 0;
    k = booth_const(n, m);
    for (int i = 0; i < booth_digits(m); i++) begin
      if (c >= 2 * i && c <= 2 * i + n) h++;
      if (c == 2 * i) h++;
    end
    if (c < n + m && k[c]) h++;
    return h;
  endfunction

  function automatic int max_booth_height(input int n, input int m);
    int h = 1;
    for (int c = 0; c < n + m; c++) if (booth_height(n, m, c) > h) h = booth_height(n, m, c);
    return h;
  endfunction

  // Column heights of the Booth heap packed as compressor-tree HEIGHTS.
  function automatic logic [128*PLAN_FW-1:0] booth_heights(input int n, input int m);
    logic [128*PLAN_FW-1:0] v;
    v = '0;
    for (int c = 0; c < n + m && c < 128; c++) v[c*PLAN_FW +: PLAN_FW] = PLAN_FW'(booth_height(n, m, c));
    return v;
  endfunction

endpackage
