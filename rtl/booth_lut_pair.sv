// Two adjacent radix-4 Booth partial-product bits from one fabric LUT.
//
// Bit j of partial product i is ((one & a_j) | (two & a_(j-1))) ^ neg, where
// one, two and neg decode the Booth digit -2*b_(2i+1) + b_(2i) + b_(2i-1):
// one = b_(2i) ^ b_(2i-1), two = digit is +-2, neg = b_(2i+1). Each bit is a
// function of five inputs. Bits j and j+1 share four of them (a_j and the
// three b bits) and differ only in their fifth (a_(j-1) for bit j, a_(j+1)
// for bit j+1). A LUT whose two 5-input halves take independent fifth inputs
// (dual 5-LUT mode with separate A5/A6 fifth inputs) therefore produces both
// bits, which is what brings the partial-product cost to about n^2/4 LUTs.
// This module holds the two halves as two 5-input functions.
// Combinational.
module booth_lut_pair (
  input  logic [2:0] bsel,   // {b_(2i+1), b_(2i), b_(2i-1)}: shared
  input  logic       a_mid,  // a_j: shared
  input  logic       a_lo,   // a_(j-1): fifth input of the lower half
  input  logic       a_hi,   // a_(j+1): fifth input of the upper half
  output logic       p_lo,   // partial-product bit j   (O5_1)
  output logic       p_hi    // partial-product bit j+1 (O5_2)
);
  logic one, two, neg;

  always_comb begin
    neg  = bsel[2];
    one  = bsel[1] ^ bsel[0];
    two  = (bsel[2] & ~bsel[1] & ~bsel[0]) | (~bsel[2] & bsel[1] & bsel[0]);
    p_lo = ((one & a_mid) | (two & a_lo))  ^ neg;
    p_hi = ((one & a_hi)  | (two & a_mid)) ^ neg;
  end
endmodule
