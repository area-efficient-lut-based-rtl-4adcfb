// Exhaustive test of the (2, 5 : 1, 2, 1) counter: for all 128 input
// patterns y0 + 2*(y1a + y1b) + 4*y2 must equal ones(x0) + 2*ones(x1).
module tb_gpc_2_5_1_2_1;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [4:0] x0;
  logic [1:0] x1;
  logic y0, y1a, y1b, y2;
  gpc_2_5_1_2_1 dut (.x0(x0), .x1(x1), .y0(y0), .y1a(y1a), .y1b(y1b), .y2(y2));
  initial begin
    for (int v = 0; v < 128; v++) begin
      {x1, x0} = 7'(v);
      #1;
      checks++;
      if (int'(y0) + 2 * (int'(y1a) + int'(y1b)) + 4 * int'(y2)
          != $countones(x0) + 2 * $countones(x1)) begin
        failures++;
        $display("FAIL x0=%b x1=%b -> %b %b %b %b", x0, x1, y0, y1a, y1b, y2);
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
