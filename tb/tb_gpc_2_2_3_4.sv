// Exhaustive test of the (2, 2, 3 : 4] counter: for all 128 patterns y must
// equal ones(x0) + 2*ones(x1) + 4*ones(x2).
module tb_gpc_2_2_3_4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0] x0;
  logic [1:0] x1, x2;
  logic [3:0] y;
  gpc_2_2_3_4 dut (.x0(x0), .x1(x1), .x2(x2), .y(y));
  initial begin
    for (int v = 0; v < 128; v++) begin
      {x2, x1, x0} = 7'(v);
      #1;
      checks++;
      if (int'(y) != $countones(x0) + 2 * $countones(x1) + 4 * $countones(x2)) begin
        failures++;
        $display("FAIL x0=%b x1=%b x2=%b y=%0d", x0, x1, x2, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
