// ssr_log: single-scale Retinex output R = log I - log Ibar, mapped to a
// displayable 8-bit pixel.
//
// I is the delayed input pixel, Ibar the estimated illumination of the
// same pixel from the multi-scale filter. Both logarithms come from
// log2_approx (Q3.5), their difference d is in 1/32 of an octave, and the
// output is clamp(OFFSET + GAIN * d, 0, 255): zero contrast sits at mid
// grey, and +-2 octaves (GAIN = 2) fill the range. OFFSET and GAIN are this
// design's choice of the clipping and normalisation to 0..255. The two
// streams are paired sample by sample; registered output.
module ssr_log
  import msr_pkg::*;
#(
  parameter int OFFSET = 128,
  parameter int GAIN   = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic i_valid,
  output logic i_ready,
  input  pix_t i_data,
  input  logic l_valid,
  output logic l_ready,
  input  pix_t l_data,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_data
);
  logic [7:0] log_i, log_l;
  logic space, take;
  int   r;

  log2_approx u_li (.x (i_data), .y (log_i));
  log2_approx u_ll (.x (l_data), .y (log_l));

  assign space   = !out_valid || out_ready;
  assign take    = space && i_valid && l_valid;
  assign i_ready = space && l_valid;
  assign l_ready = space && i_valid;

  always_comb begin
    r = OFFSET + GAIN * (int'(log_i) - int'(log_l));
    if (r < 0)   r = 0;
    if (r > 255) r = 255;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (space) begin
      out_valid <= take;
      if (take) out_data <= pix_t'(r[7:0]);
    end
  end
endmodule
