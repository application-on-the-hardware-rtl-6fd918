// msr_pkg: types, constants and arithmetic helpers shared by the
// multi-scale Retinex (MSR) filter chain.
//
// Pixels are 8-bit unsigned samples of one colour component. The Gaussian
// low-pass kernel is 9 taps long, as in the 9x9 window of the direct 2-D
// filter the line-based structure replaces. The tap values are this design's
// choice: the binomial kernel 1 8 28 56 70 56 28 8 1. It sums to 256, so a
// down-sampling pass normalises with a rounding shift by 8. Its even taps
// (1 28 70 28 1) and its odd taps (8 56 56 8) each sum to 128, so every phase
// of the polyphase interpolator has unit DC gain after a shift by 7.
package msr_pkg;

  localparam int unsigned PIX_W = 8;
  localparam int unsigned TAPS  = 9;
  localparam int unsigned COEF_W = 8;

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [COEF_W-1:0] coef_t;
  typedef coef_t [TAPS-1:0]  kernel_t;

  // Tap k multiplies the sample k positions (columns or lines) back in time.
  localparam kernel_t GAUSS9 = '{8'd1, 8'd8, 8'd28, 8'd56, 8'd70,
                                 8'd56, 8'd28, 8'd8, 8'd1};

  // Round a non-negative sum to nearest, shift right by sh, and saturate.
  function automatic pix_t round_sat(input logic [31:0] acc, input int unsigned sh);
    logic [31:0] r;
    r = (acc + (32'd1 << (sh - 1))) >> sh;
    return (r > 32'd255) ? pix_t'(8'd255) : pix_t'(r[7:0]);
  endfunction

endpackage
