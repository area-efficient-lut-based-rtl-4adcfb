// Test of the dual-rail ripple-sum counter (N+1, 4N+1 : N, N+1, 1) for
// N = 2, 3, 4, i.e. (3,9:2,3,1), (4,13:3,4,1) and (5,17:4,5,1).
// N = 2 is tested exhaustively (4096 patterns), N = 3 and 4 with 20000
// random patterns each plus all-ones. The weighted output sum must equal
// ones(x0) + 2*ones(x1).
module tb_gpc_dual_rail;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [8:0]  a0; logic [2:0] a1; logic ay0; logic [2:0] ay1; logic [1:0] ay2;
  logic [12:0] b0; logic [3:0] b1; logic by0; logic [3:0] by1; logic [2:0] by2;
  logic [16:0] c0; logic [4:0] c1; logic cy0; logic [4:0] cy1; logic [3:0] cy2;

  gpc_dual_rail #(.N(2)) u2 (.x0(a0), .x1(a1), .y0(ay0), .y1(ay1), .y2(ay2));
  gpc_dual_rail #(.N(3)) u3 (.x0(b0), .x1(b1), .y0(by0), .y1(by1), .y2(by2));
  gpc_dual_rail #(.N(4)) u4 (.x0(c0), .x1(c1), .y0(cy0), .y1(cy1), .y2(cy2));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a1, a0} = 12'(v);
      #1;
      check(int'(ay0) + 2 * $countones(ay1) + 4 * $countones(ay2),
            $countones(a0) + 2 * $countones(a1), "N=2");
    end
    for (int v = 0; v <= 20000; v++) begin
      {b1, b0} = (v == 20000) ? '1 : 17'($urandom);
      {c1, c0} = (v == 20000) ? '1 : 22'({$urandom, $urandom});
      #1;
      check(int'(by0) + 2 * $countones(by1) + 4 * $countones(by2),
            $countones(b0) + 2 * $countones(b1), "N=3");
      check(int'(cy0) + 2 * $countones(cy1) + 4 * $countones(cy2),
            $countones(c0) + 2 * $countones(c1), "N=4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
