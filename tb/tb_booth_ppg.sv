// Test of the Booth partial-product heap generator, 16 x 16 (defaults) and
// 9 x 7 (odd width of b). For random and corner operands the weighted sum
// of all heap bits, modulo 2^(N+M), must equal a*b, and every bit above a
// column's height must be 0. The expected heights are counted here from the
// heap's definition: one bit per digit whose partial product spans the
// column, the negation carry of a digit in its lowest column, and the bits
// of the sign-extension constant.
module tb_booth_ppg;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N1 = 16, M1 = 16, W1 = 32;
  localparam int N2 = 9,  M2 = 7,  W2 = 16;
  localparam int MH = 24;   // enough storage for both heaps in the checker

  logic signed [N1-1:0] a1; logic signed [M1-1:0] b1;
  logic signed [N2-1:0] a2; logic signed [M2-1:0] b2;
  logic [W1-1:0][lutmul_pkg::max_booth_height(N1, M1)-1:0] h1;
  logic [W2-1:0][lutmul_pkg::max_booth_height(N2, M2)-1:0] h2;

  booth_ppg #(.N(N1), .M(M1)) u1 (.a(a1), .b(b1), .heap_o(h1));
  booth_ppg #(.N(N2), .M(M2)) u2 (.a(a2), .b(b2), .heap_o(h2));

  function automatic int exp_height(input int n, input int m, input int c);
    int d = (m + 1) / 2;
    int h = 0;
    longint k = 0;
    for (int i = 0; i < d; i++) begin
      if (c >= 2 * i && c <= 2 * i + n) h++;
      if (c == 2 * i) h++;
      k -= longint'(1) << (2 * i + n);
    end
    if ((k >>> c) & 1) h++;
    return h;
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      longint s1, s2;
      a1 = (t < 4) ? ((t & 1) ? 16'sh8000 : 16'sh7fff) : 16'($urandom);
      b1 = (t < 4) ? ((t & 2) ? 16'sh8000 : -16'sd1)   : 16'($urandom);
      a2 = 9'($urandom);
      b2 = 7'($urandom);
      #1;
      s1 = 0; s2 = 0;
      for (int c = 0; c < W1; c++)
        for (int k = 0; k < $bits(h1[c]); k++) begin
          if (h1[c][k]) begin
            s1 += longint'(1) << c;
            if (k >= exp_height(N1, M1, c)) begin
              checks++; failures++;
              $display("FAIL 16x16: bit %0d of column %0d above height is set", k, c);
            end
          end
        end
      for (int c = 0; c < W2; c++)
        for (int k = 0; k < $bits(h2[c]); k++) begin
          if (h2[c][k]) begin
            s2 += longint'(1) << c;
            if (k >= exp_height(N2, M2, c)) begin
              checks++; failures++;
              $display("FAIL 9x7: bit %0d of column %0d above height is set", k, c);
            end
          end
        end
      checks++;
      if (W1'(s1) !== W1'(a1 * b1)) begin
        failures++;
        $display("FAIL 16x16: %0d * %0d heap sum %0h", a1, b1, W1'(s1));
      end
      checks++;
      if (W2'(s2) !== W2'(a2 * b2)) begin
        failures++;
        $display("FAIL 9x7: %0d * %0d heap sum %0h", a2, b2, W2'(s2));
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
