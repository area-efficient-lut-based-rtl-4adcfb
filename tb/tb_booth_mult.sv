// End-to-end test of the Booth/GPC tree multiplier.
//
// Three instances run side by side:
//   u_def  - default parameters (16 x 16, combinational),
//   u_pipe - 16 x 16 with a register after the partial products, after the
//            first compression stage and after the adder (latency 3),
//   u_odd  - 7 x 5 (odd widths: b is sign-extended before recoding).
// Operands are random, plus the corner values 0, 1, -1, the most negative
// and most positive numbers. Products are compared with the simulator's own
// signed multiplication. The testbench also recodes every b itself and
// counts each Booth digit value (-2..2), including the "negative zero" digit
// (b bits 111), and checks that each occurred. For u_pipe it checks the
// 3-cycle latency with a valid pattern that has bubbles.
module tb_booth_mult;
  localparam int NT = 4000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- default instance (combinational) ----------------
  logic signed [15:0] da, db;
  logic signed [31:0] dp;
  logic               dv;
  booth_mult u_def (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(da), .b(db),
    .out_valid(dv), .p(dp)
  );

  // ---------------- pipelined instance ----------------
  logic signed [15:0] pa, pb;
  logic signed [31:0] pp;
  logic               pin_v, pout_v;
  booth_mult #(.N(16), .M(16), .PIPE_PPG(1'b1), .PIPE_MASK(32'h1), .PIPE_OUT(1'b1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .in_valid(pin_v), .a(pa), .b(pb),
    .out_valid(pout_v), .p(pp)
  );

  // ---------------- odd-width instance ----------------
  logic signed [6:0]  oa;
  logic signed [4:0]  ob;
  logic signed [11:0] op;
  logic               ov;
  booth_mult #(.N(7), .M(5)) u_odd (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .a(oa), .b(ob),
    .out_valid(ov), .p(op)
  );

  int digit_seen [5];   // index = digit + 2
  int neg_zero_seen = 0;
  int bubbles = 0, pipe_results = 0;

  task automatic count_digits(input logic [15:0] b);
    logic [16:0] e;
    int d;
    e = {b, 1'b0};
    for (int i = 0; i < 8; i++) begin
      d = -2 * int'(e[2*i+2]) + int'(e[2*i+1]) + int'(e[2*i]);
      digit_seen[d + 2]++;
      if (e[2*i +: 3] == 3'b111) neg_zero_seen++;
    end
  endtask

  function automatic logic signed [15:0] pick16(input int k);
    case (k % 8)
      0: return 16'sd0;
      1: return 16'sd1;
      2: return -16'sd1;
      3: return 16'sh8000;
      4: return 16'sh7fff;
      default: return 16'($urandom);
    endcase
  endfunction

  // expected results of the pipelined instance, by issue cycle
  logic signed [31:0] exp_q [$];
  int                 exp_t [$];
  int cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && pout_v) begin
      checks++;
      pipe_results++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL pipe: unexpected out_valid");
      end else begin
        automatic logic signed [31:0] e = exp_q.pop_front();
        automatic int t = exp_t.pop_front();
        if (pp !== e || cycle - t != 3) begin
          failures++;
          $display("FAIL pipe: p=%0d exp=%0d latency=%0d", pp, e, cycle - t);
        end
      end
    end
  end

  initial begin
    pin_v = 1'b0; pa = '0; pb = '0; da = '0; db = '0; oa = '0; ob = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NT; n++) begin
      // default and odd instances: combinational, check after settling
      da = (n < 64) ? pick16(n) : pick16(n / 8);
      db = (n < 64) ? pick16(n / 8) : pick16(n);
      if (n >= 64) begin
        da = pick16($urandom);
        db = pick16($urandom);
      end
      oa = 7'($urandom);
      ob = 5'($urandom);
      if (n < 128) begin
        oa = 7'(n % 8 == 0 ? 7'sh40 : 7'sh3f);
        ob = 5'(n);
      end
      count_digits(db);
      #1;
      checks++;
      if (dp !== 32'(da * db) || dv !== 1'b1) begin
        failures++;
        $display("FAIL def: %0d * %0d = %0d got %0d", da, db, 32'(da * db), dp);
      end
      checks++;
      if (op !== 12'(oa * ob)) begin
        failures++;
        $display("FAIL odd: %0d * %0d = %0d got %0d", oa, ob, 12'(oa * ob), op);
      end
      // pipelined instance: issue with random bubbles
      @(negedge clk);
      pin_v = ($urandom % 4 != 0);
      if (!pin_v) bubbles++;
      pa = pick16($urandom);
      pb = pick16($urandom);
      if (pin_v) begin
        exp_q.push_back(32'(pa * pb));
        exp_t.push_back(cycle);
      end
      @(posedge clk);
    end
    @(negedge clk);
    pin_v = 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL pipe: %0d results missing", exp_q.size());
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (digit_seen[d] == 0) begin
        failures++;
        $display("FAIL: Booth digit %0d never exercised", d - 2);
      end
    end
    checks++;
    if (neg_zero_seen == 0 || bubbles == 0 || pipe_results == 0) begin
      failures++;
      $display("FAIL: coverage neg_zero=%0d bubbles=%0d results=%0d", neg_zero_seen, bubbles, pipe_results);
    end
    $display("digits -2..2: %0d %0d %0d %0d %0d, negative zero %0d, bubbles %0d, pipelined results %0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4],
             neg_zero_seen, bubbles, pipe_results);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NT * 2 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
