// Test of the GPC compressor tree on the bit-heap shapes of the published
// compressor evaluation: one column of 128, 256 and 512 bits; two columns
// of 128, 256 and 512 bits each; and the heap of a 16 x 16 radix-2 (AND
// array) multiplication, whose column c holds min(c, 30 - c) + 1 bits.
// A small heap of 9 + 2 bits makes the tree use its (6 : 3] counter.
// A further instance takes the 16 x 16 radix-2 heap with a register after
// every compression stage and after the adder, and checks its latency.
//
// Each heap is filled with random bits (and all ones once); the output must
// equal the weighted number of ones. The testbench also asks each tree for
// its compression plan and counts, over all instances, how many counters of
// each of the eight types were placed; every type must occur.
module tb_compressor_tree;
  import lutmul_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int done = 0;
  int type_count [NUM_GPC];

  localparam int NI = 9;

  function automatic int cols_of(input int i);
    case (i)
      0, 1, 2: return 1;
      3, 4, 5, 8: return 2;
      default: return 31;
    endcase
  endfunction
  function automatic int h_of(input int i, input int c);
    case (i)
      0, 3: return 128;
      1, 4: return 256;
      2, 5: return 512;
      8: return (c == 0) ? 9 : 2;
      default: return ((c < 30 - c) ? c : 30 - c) + 1;
    endcase
  endfunction
  function automatic logic [31*PLAN_FW-1:0] heights_of(input int i);
    logic [31*PLAN_FW-1:0] v = '0;
    for (int c = 0; c < cols_of(i); c++) v[c*PLAN_FW +: PLAN_FW] = PLAN_FW'(h_of(i, c));
    return v;
  endfunction
  function automatic int maxh_of(input int i);
    int m = 0;
    for (int c = 0; c < cols_of(i); c++) if (h_of(i, c) > m) m = h_of(i, c);
    return m;
  endfunction

  for (genvar g = 0; g < NI; g++) begin : g_inst
    localparam int COLS = cols_of(g);
    localparam int MAXH = maxh_of(g);
    localparam logic [COLS*PLAN_FW-1:0] HGT = heights_of(g);
    localparam bit PIPED = (g == 7);
    localparam int OW = COLS + $clog2(MAXH + 1) + 1;
    logic [COLS-1:0][MAXH-1:0] heap;
    logic [OW-1:0] sum;
    logic in_v, out_v;

    compressor_tree #(
      .COLS(COLS), .MAXH(MAXH), .HEIGHTS(HGT),
      .PIPE_MASK(PIPED ? 32'hffff_ffff : 32'h0), .PIPE_OUT(PIPED)
    ) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_v), .heap_i(heap),
      .out_valid(out_v), .sum_o(sum)
    );

    initial begin
      longint exp;
      int lat;
      in_v = 1'b0;
      heap = '0;
      @(posedge rst_n);
      if (!PIPED) begin
        for (int s = 0; s < 12; s++)
          for (int c = 0; c < COLS + 12; c++)
            for (int t = 0; t < NUM_GPC; t++) type_count[t] += dut.num(s, c, t);
      end
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        exp = 0;
        for (int c = 0; c < COLS; c++)
          for (int k = 0; k < MAXH; k++) begin
            heap[c][k] = (k < h_of(g, c)) ? ((n == 0) ? 1'b1 : 1'($urandom)) : 1'b0;
            if (heap[c][k]) exp += longint'(1) << c;
          end
        in_v = 1'b1;
        lat = 0;
        if (PIPED) begin
          @(negedge clk);
          in_v = 1'b0;
          lat = 1;
          while (!out_v && lat < 40) begin
            @(negedge clk);
            lat++;
          end
          checks++;
          if (lat != dut.NSTAGES + 1) begin
            failures++;
            $display("FAIL inst %0d: latency %0d, expected %0d", g, lat, dut.NSTAGES + 1);
          end
        end else begin
          #1;
        end
        checks++;
        if (!out_v || longint'(sum) != exp) begin
          failures++;
          $display("FAIL inst %0d: sum %0d expected %0d valid %b", g, sum, exp, out_v);
        end
      end
      if (g == 0 || g == 6)
        $display("shape %0d: %0d compression stages", g, dut.NSTAGES);
      done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == NI);
    for (int t = 0; t < NUM_GPC; t++) begin
      checks++;
      $display("counter type %0d placed %0d times", t, type_count[t]);
      if (type_count[t] == 0) begin
        failures++;
        $display("FAIL: counter type %0d never placed", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
