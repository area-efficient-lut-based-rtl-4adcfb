// Exhaustive test of the (3 : 2] counter: s + 2c must equal the number of
// ones among the three inputs, for all 8 input patterns.
module tb_gpc_3_2;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0] x;
  logic s, c;
  gpc_3_2 dut (.x(x), .s(s), .c(c));
  initial begin
    for (int v = 0; v < 8; v++) begin
      x = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(c) != $countones(x)) begin
        failures++;
        $display("FAIL x=%b s=%b c=%b", x, s, c);
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
