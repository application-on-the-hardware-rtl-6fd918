// lpf_down: line-based X-Y separable Gaussian low-pass with 2x2
// down-sampling (one "x-y LPF down-sampling" stage of the pyramid).
//
// The horizontal polyphase filter halves the line first, so the vertical
// filter's eight line delays are only half a line long; the vertical filter
// then keeps every other line. Output pixel (q, m) is
//   sum_{j,k} h[j] h[k] x[2q+1-j][2m+1-k]
// with one rounding to 8 bits after each direction, samples outside the
// frame to the top and left taken as zero. The result leaves as soon as
// x[2q+1][2m+1] has been accepted (plus two register stages), so no flush
// is needed at the right or bottom edge.
//
// Interface: valid/ready stream in, W_IN x H_IN per frame; valid/ready
// stream out, W_IN/2 x ceil(H_IN/2) per frame. Full rate in (one pixel per cycle).
module lpf_down
  import msr_pkg::*;
#(
  parameter int unsigned W_IN = 1920,
  parameter int unsigned H_IN = 1080,
  parameter kernel_t     COEF = GAUSS9
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_data,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_data
);
  logic x_valid, x_ready;
  pix_t x_data;

  fir_x_down #(.W_IN(W_IN), .COEF(COEF)) u_x (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid (x_valid), .out_ready (x_ready), .out_data (x_data)
  );

  fir_y_down #(.W_IN(W_IN / 2), .H_IN(H_IN), .COEF(COEF)) u_y (
    .clk, .rst_n,
    .in_valid (x_valid), .in_ready (x_ready), .in_data (x_data),
    .out_valid, .out_ready, .out_data
  );
endmodule
