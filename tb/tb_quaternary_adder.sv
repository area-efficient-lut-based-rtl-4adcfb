// Test of the quaternary adder: random rows (and all-ones rows) at the
// default width 32 and at width 8; the sum must equal
// a + b + c + d + e0 + e1 modulo 2^W.
module tb_quaternary_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b, c, d, s;
  logic [7:0]  a8, b8, c8, d8, s8;
  logic e0, e1;
  quaternary_adder dut (.a(a), .b(b), .c(c), .d(d), .e0(e0), .e1(e1), .sum(s));
  quaternary_adder #(.W(8)) dut8 (.a(a8), .b(b8), .c(c8), .d(d8), .e0(e0), .e1(e1), .sum(s8));
  initial begin
    for (int t = 0; t < 20000; t++) begin
      if (t < 4) begin
        {a, b, c, d} = '1;
        {e1, e0} = 2'(t);
      end else begin
        a = $urandom; b = $urandom; c = $urandom; d = $urandom;
        {e1, e0} = 2'($urandom);
      end
      {a8, b8, c8, d8} = {a[7:0], b[7:0], c[7:0], d[7:0]};
      #1;
      checks++;
      if (s !== 32'(a + b + c + d + 32'(e0) + 32'(e1))) begin
        failures++;
        $display("FAIL W=32: %h %h %h %h %b %b -> %h", a, b, c, d, e0, e1, s);
      end
      checks++;
      if (s8 !== 8'(a8 + b8 + c8 + d8 + 8'(e0) + 8'(e1))) begin
        failures++;
        $display("FAIL W=8");
      end
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
