// Exhaustive test of the Booth LUT pair (64 patterns). For every recoder
// input {b_(2i+1), b_(2i), b_(2i-1)} and every value of a_(j+1), a_j,
// a_(j-1), the outputs must equal bits j and j+1 of |digit| * A, inverted
// when b_(2i+1) = 1 (the +1 of the negation is a separate heap bit). The
// digit is decoded here from its definition -2 b_(2i+1) + b_(2i) + b_(2i-1).
module tb_booth_lut_pair;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [2:0] bsel;
  logic a_mid, a_lo, a_hi, p_lo, p_hi;
  booth_lut_pair dut (.bsel(bsel), .a_mid(a_mid), .a_lo(a_lo), .a_hi(a_hi), .p_lo(p_lo), .p_hi(p_hi));
  initial begin
    for (int bs = 0; bs < 8; bs++) begin
      for (int av = 0; av < 8; av++) begin
        automatic int d = -2 * ((bs >> 2) & 1) + ((bs >> 1) & 1) + (bs & 1);
        automatic int mag = (d < 0) ? -d : d;
        // A = {a_hi, a_mid, a_lo} at bit positions j+1, j, j-1 -> use
        // a 3-bit value placed at positions 1..3, bits j = 2, j+1 = 3.
        automatic logic [4:0] m = 5'((av << 1) * mag);
        automatic logic exp_lo = m[2] ^ bs[2];
        automatic logic exp_hi = m[3] ^ bs[2];
        bsel = 3'(bs);
        {a_hi, a_mid, a_lo} = 3'(av);
        #1;
        checks++;
        if (p_lo !== exp_lo || p_hi !== exp_hi) begin
          failures++;
          $display("FAIL bsel=%b a=%b got %b%b exp %b%b", bsel, av[2:0], p_hi, p_lo, exp_hi, exp_lo);
        end
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
