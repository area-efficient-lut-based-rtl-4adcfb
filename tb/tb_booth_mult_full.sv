// Full-size test of the multiplier exactly as delivered: one booth_mult
// with every parameter at its default (16 x 16, combinational). It applies
// the corner operands (0, 1, -1, most negative, most positive, in all
// pairings) and 20000 random pairs, and compares each product with the
// simulator's signed multiplication; out_valid must follow in_valid.
module tb_booth_mult_full;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  logic in_v, out_v;

  booth_mult dut (
    .clk(clk), .rst_n(1'b1), .in_valid(in_v), .a(a), .b(b), .out_valid(out_v), .p(p)
  );

  localparam logic signed [15:0] CORNER [5] = '{16'sd0, 16'sd1, -16'sd1, 16'sh8000, 16'sh7fff};

  task automatic apply(input logic signed [15:0] x, input logic signed [15:0] y, input logic v);
    a = x; b = y; in_v = v;
    #1;
    checks++;
    if (p !== 32'(x * y) || out_v !== v) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d (valid %b), expected %0d", x, y, p, out_v, 32'(x * y));
    end
    @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) apply(CORNER[i], CORNER[j], 1'b1);
    for (int n = 0; n < 20000; n++) apply(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
