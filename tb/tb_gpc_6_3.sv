// Exhaustive test of the (6 : 3] counter: y must equal the number of ones
// among the six inputs, for all 64 patterns.
module tb_gpc_6_3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [5:0] x;
  logic [2:0] y;
  gpc_6_3 dut (.x(x), .y(y));
  initial begin
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
      #1;
      checks++;
      if (int'(y) != $countones(x)) begin
        failures++;
        $display("FAIL x=%b y=%0d", x, y);
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
