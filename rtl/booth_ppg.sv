// Radix-4 modified Booth partial-product bit heap of a signed N x M product.
//
// B (M bits, two's complement, sign-extended to an even width) is recoded
// into digits b'_i = -2 b_(2i+1) + b_(2i) + b_(2i-1), b_(-1) = 0, each in
// {-2..2}. Digit i selects 0, +-A or +-2A as an (N+1)-bit two's complement
// partial product P'_i whose bit j has weight 2^(2i+j); negation is done by
// inverting the bits and adding a carry c_i of weight 2^(2i). Sign
// extension is avoided: the sign bit of every P'_i is inverted and the
// constant -sum_i 2^(2i+N) (mod 2^(N+M)) is added as fixed heap bits. Bits
// are produced two at a time by booth_lut_pair.
//
// Output heap_o[c][k] is bit k of column c (weight 2^c); column c holds
// lutmul_pkg::booth_height(N, M, c) bits in order: partial-product bits by
// increasing digit, then the carry c_i, then the constant bit. Bits above
// the height are 0. The heap sums to A*B modulo 2^(N+M). Combinational.
// The recoding and the bit weights follow the reference scheme; the
// constant-based sign extension and the bit order are this design's choice.
module booth_ppg
  import lutmul_pkg::*;
#(
  parameter int unsigned N    = 16,  // width of A
  parameter int unsigned M    = 16,  // width of B (recoded operand)
  parameter int unsigned W    = N + M,
  parameter int unsigned MAXH = max_booth_height(N, M)
) (
  input  logic [N-1:0]            a,
  input  logic [M-1:0]            b,
  output logic [W-1:0][MAXH-1:0]  heap_o
);
  localparam int unsigned D  = booth_digits(M);
  localparam int unsigned ME = 2 * D;                 // even width of B
  localparam logic [127:0] K = booth_const(N, M);

  logic [N:0]    a_ext;     // A sign-extended by one bit
  logic [N+1:0]  a_lo_ext;  // a_lo_ext[j+1] = a_(j), a_lo_ext[0] = a_(-1) = 0
  logic [ME:0]   b_ext;     // b_ext[k+1] = b_k, b_ext[0] = b_(-1) = 0
  logic [N:0]    pp   [D];  // P'_i, sign bit not yet inverted

  always_comb begin
    a_ext    = {a[N-1], a};
    a_lo_ext = {a_ext, 1'b0};
    b_ext    = {{(ME - M){b[M-1]}}, b, 1'b0};
  end

  for (genvar i = 0; i < D; i++) begin : g_digit
    for (genvar j = 0; j <= N; j += 2) begin : g_pair
      logic p_lo, p_hi;
      booth_lut_pair u_lut (
        .bsel (b_ext[2*i+2 -: 3]),
        .a_mid(a_ext[j]),
        .a_lo (a_lo_ext[j]),
        .a_hi ((j + 1 <= N) ? a_ext[(j + 1 <= N) ? j + 1 : N] : 1'b0),
        .p_lo (p_lo),
        .p_hi (p_hi)
      );
      assign pp[i][j] = p_lo;
      if (j + 1 <= N) begin : g_hi
        assign pp[i][j+1] = p_hi;
      end
    end
  end

  // Number of partial products with a bit in column c among digits < i.
  function automatic int pp_before(input int c, input int i);
    int n = 0;
    for (int k = 0; k < i; k++) if (c >= 2 * k && c <= 2 * k + int'(N)) n++;
    return n;
  endfunction

  for (genvar c = 0; c < W; c++) begin : g_col
    localparam int NPP = pp_before(c, D);
    localparam bit HAS_C = (c % 2 == 0) && (c / 2 < D);
    localparam bit HAS_K = K[c];
    localparam int H = NPP + int'(HAS_C) + int'(HAS_K);
    for (genvar i = 0; i < D; i++) begin : g_pp
      if (c >= 2 * i && c <= 2 * i + N) begin : g_b
        if (c - 2 * i == N) begin : g_sign
          assign heap_o[c][pp_before(c, i)] = ~pp[i][N];
        end else begin : g_body
          assign heap_o[c][pp_before(c, i)] = pp[i][c - 2 * i];
        end
      end
    end
    if (HAS_C) begin : g_carry
      assign heap_o[c][NPP] = b_ext[c + 2];   // c_i = b_(2i+1)
    end
    if (HAS_K) begin : g_const
      assign heap_o[c][NPP + int'(HAS_C)] = 1'b1;
    end
    for (genvar k = H; k < MAXH; k++) begin : g_zero
      assign heap_o[c][k] = 1'b0;
    end
  end
endmodule
