// Runs the multiplier at every N x N width of the published multiplier
// comparison, 6 x 6 to 32 x 32 in steps of 2, plus 18 x 18 with a register
// after the partial products and after the adder. Each width gets random
// operands plus the corner cases (most negative x most negative, -1 x most
// negative, 0, 1); products are compared with signed multiplication.
module tb_mult_widths;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int done = 0;
  localparam int NW = 14;

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int N = 6 + 2 * g;
    logic signed [N-1:0] a, b;
    logic signed [2*N-1:0] p;
    logic v;
    booth_mult #(.N(N), .M(N)) dut (
      .clk(clk), .rst_n(1'b1), .in_valid(1'b1), .a(a), .b(b), .out_valid(v), .p(p)
    );
    initial begin
      for (int t = 0; t < 500; t++) begin
        case (t)
          0: begin a = {1'b1, {(N-1){1'b0}}}; b = {1'b1, {(N-1){1'b0}}}; end
          1: begin a = '1;                      b = {1'b1, {(N-1){1'b0}}}; end
          2: begin a = '0;                      b = N'($urandom); end
          3: begin a = N'(1);                   b = {1'b0, {(N-1){1'b1}}}; end
          default: begin a = N'({$urandom, $urandom}); b = N'({$urandom, $urandom}); end
        endcase
        #1;
        checks++;
        if (p !== (2*N)'(a * b) || !v) begin
          failures++;
          $display("FAIL %0dx%0d: %0d * %0d got %0d", N, N, a, b, p);
        end
        @(posedge clk);
      end
      done++;
    end
  end

  // 18 x 18 with two register levels
  logic signed [17:0] pa, pb;
  logic signed [35:0] pp;
  logic pv_in, pv_out, rst_n;
  booth_mult #(.N(18), .M(18), .PIPE_PPG(1'b1), .PIPE_OUT(1'b1)) u_p (
    .clk(clk), .rst_n(rst_n), .in_valid(pv_in), .a(pa), .b(pb), .out_valid(pv_out), .p(pp)
  );
  initial begin
    logic signed [35:0] exp1, exp2;
    rst_n = 1'b0; pv_in = 1'b0; pa = '0; pb = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      pa = 18'($urandom); pb = 18'($urandom); pv_in = 1'b1;
      exp1 = 36'(pa * pb);
      @(negedge clk);
      pv_in = 1'b0;
      checks++;
      if (pv_out) begin
        failures++;
        $display("FAIL pipe: result after one cycle");
      end
      @(negedge clk);
      checks++;
      if (!pv_out || pp !== exp1) begin
        failures++;
        $display("FAIL pipe: got %0d valid %b, expected %0d after two cycles", pp, pv_out, exp1);
      end
    end
    done++;
  end

  initial begin
    wait (done == NW + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
