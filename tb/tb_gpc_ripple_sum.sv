// Exhaustive test of the ripple-sum counter (2N+1 : N, 1) for N = 4, the
// (9 : 4, 1) counter (512 patterns), and N = 2 (32 patterns):
// y0 + 2*ones(y1) must equal ones(x).
module tb_gpc_ripple_sum;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [8:0] x;  logic y0; logic [3:0] y1;
  logic [4:0] u;  logic z0; logic [1:0] z1;
  gpc_ripple_sum dut (.x(x), .y0(y0), .y1(y1));
  gpc_ripple_sum #(.N(2)) dut2 (.x(u), .y0(z0), .y1(z1));
  initial begin
    for (int v = 0; v < 512; v++) begin
      x = 9'(v);
      u = 5'(v);
      #1;
      checks++;
      if (int'(y0) + 2 * $countones(y1) != $countones(x)) begin
        failures++;
        $display("FAIL N=4 x=%b y0=%b y1=%b", x, y0, y1);
      end
      checks++;
      if (int'(z0) + 2 * $countones(z1) != $countones(u)) begin
        failures++;
        $display("FAIL N=2 x=%b", u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
