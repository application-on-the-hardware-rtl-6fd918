// log2_approx: base-2 logarithm of an 8-bit pixel in fixed point, Q3.5.
//
// The integer part is the position of the leading one; the fraction is the
// five bits that follow it, i.e. a straight line between powers of two
// (error below 0.09). Zero is treated as one, so log2(0) = 0. Purely
// combinational.
module log2_approx
  import msr_pkg::*;
(
  input  pix_t       x,
  output logic [7:0] y
);
  logic [2:0] e;
  logic [6:0] frac;

  always_comb begin
    e = '0;
    for (int i = 1; i < 8; i++) if (x[i]) e = 3'(i);
    frac = 7'(x << (3'd7 - e));   // bits below the leading one
    y = {e, frac[6:2]};
  end
endmodule
