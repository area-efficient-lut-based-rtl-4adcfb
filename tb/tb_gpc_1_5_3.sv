// Exhaustive test of the (1, 5 : 3] counter: for all 64 input patterns the
// output must equal (ones among x0) + 2 * x1.
module tb_gpc_1_5_3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [4:0] x0;
  logic       x1;
  logic [2:0] y;
  gpc_1_5_3 dut (.x0(x0), .x1(x1), .y(y));
  initial begin
    for (int v = 0; v < 64; v++) begin
      {x1, x0} = 6'(v);
      #1;
      checks++;
      if (int'(y) != $countones(x0) + 2 * int'(x1)) begin
        failures++;
        $display("FAIL x0=%b x1=%b y=%0d", x0, x1, y);
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
