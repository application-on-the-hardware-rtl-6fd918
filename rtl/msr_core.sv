// msr_core: multi-stage, multi-rate estimate of the illumination Ibar for
// multi-scale Retinex, followed by the Retinex output log I - log Ibar.
//
// Three 2x2 down-sampling low-pass stages form the scales D1 (W/2 x H/2),
// D2 (W/4 x H/4) and D3 (W/8 x H/8). The coarsest scale, weighted by
// omega_3, is interpolated back up one octave and added to omega_2 * D2; the
// sum is interpolated and added to omega_1 * D1; that sum is interpolated
// to full size and is Ibar. Because the weights sum to one and every filter
// has unit DC gain, Ibar keeps the brightness of the input.
//
// Every stage is line based and causal, so a scale reaches its adder long
// after the finer scale it is added to. The finer scale (and the input
// pixel itself, for the final log stage) is therefore held in a
// delay-adjustment FIFO, and each adder pairs samples by their raster
// position. The FIFO depths are given in lines of the scale they hold and
// must cover the lag of the coarse path (peaks measured on 1920 x 1080
// frames: 7.1 lines of I, 3.1 lines of D1, 1.1 lines of D2); too small a
// FIFO stalls the pipeline for good. The pyramid structure, its three
// scales and the need for a delay on the finer path follow the published
// design; the FIFO form of that delay and the depths are this design's.
//
// Interface: valid/ready stream of W x H pixels per frame in raster order
// in; the same number of 8-bit Retinex pixels out, in the same order. The
// input is taken at one pixel per cycle on average. W must be a multiple of
// 8; H may be any height of at least 8 (a scale with an odd line count is
// handled by the border rules of lpf_down and lpf_up). Debug outputs count the samples taken by each
// scale, for observing the stage-by-stage processing delay.
module msr_core
  import msr_pkg::*;
#(
  parameter int unsigned W        = 1920,
  parameter int unsigned H        = 1080,
  parameter logic [7:0]  OMEGA1   = 8'd85,
  parameter logic [7:0]  OMEGA2   = 8'd85,
  parameter logic [7:0]  OMEGA3   = 8'd86,
  parameter int unsigned FIFO_I_LINES  = 12,
  parameter int unsigned FIFO_D1_LINES = 8,
  parameter int unsigned FIFO_D2_LINES = 8,
  parameter kernel_t     COEF     = GAUSS9
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_data,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_data,
  // Illumination estimate Ibar as it enters the log stage (for observation).
  output logic ibar_valid,
  output pix_t ibar_data
);
  localparam int unsigned H1 = (H + 1) / 2;
  localparam int unsigned H2 = (H1 + 1) / 2;
  localparam int unsigned H3 = (H2 + 1) / 2;

  // Stream wires: <name>_v / _r / _d.
  logic i0_v, i0_r;  pix_t i0_d;    // input copy to the delay FIFO
  logic ia_v, ia_r;  pix_t ia_d;    // input copy to the first down stage
  logic id_v, id_r;  pix_t id_d;    // delayed input to the log stage
  logic d1_v, d1_r;  pix_t d1_d;
  logic d1s_v, d1s_r; pix_t d1s_d;  // D1 skip path
  logic d1n_v, d1n_r; pix_t d1n_d;  // D1 to next down stage
  logic d1f_v, d1f_r; pix_t d1f_d;  // D1 after its FIFO
  logic d1w_v, d1w_r; pix_t d1w_d;  // omega_1 * D1
  logic d2_v, d2_r;  pix_t d2_d;
  logic d2s_v, d2s_r; pix_t d2s_d;
  logic d2n_v, d2n_r; pix_t d2n_d;
  logic d2f_v, d2f_r; pix_t d2f_d;
  logic d2w_v, d2w_r; pix_t d2w_d;  // omega_2 * D2
  logic d3_v, d3_r;  pix_t d3_d;
  logic d3w_v, d3w_r; pix_t d3w_d;  // omega_3 * D3
  logic u3_v, u3_r;  pix_t u3_d;
  logic s2_v, s2_r;  pix_t s2_d;
  logic u2_v, u2_r;  pix_t u2_d;
  logic s1_v, s1_r;  pix_t s1_d;
  logic u1_v, u1_r;  pix_t u1_d;    // Ibar

  // ---- Input: one copy waits for Ibar, one goes down the pyramid ----
  stream_fork u_fork0 (
    .in_valid (in_valid), .in_ready (in_ready), .in_data (in_data),
    .a_valid (i0_v), .a_ready (i0_r), .a_data (i0_d),
    .b_valid (ia_v), .b_ready (ia_r), .b_data (ia_d));

  sync_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_I_LINES * W)) u_fifo_i (
    .clk, .rst_n,
    .in_valid (i0_v), .in_ready (i0_r), .in_data (i0_d),
    .out_valid (id_v), .out_ready (id_r), .out_data (id_d));

  // ---- Down-sampling path ----
  lpf_down #(.W_IN(W), .H_IN(H), .COEF(COEF)) u_down1 (
    .clk, .rst_n,
    .in_valid (ia_v), .in_ready (ia_r), .in_data (ia_d),
    .out_valid (d1_v), .out_ready (d1_r), .out_data (d1_d));

  stream_fork u_fork1 (
    .in_valid (d1_v), .in_ready (d1_r), .in_data (d1_d),
    .a_valid (d1s_v), .a_ready (d1s_r), .a_data (d1s_d),
    .b_valid (d1n_v), .b_ready (d1n_r), .b_data (d1n_d));

  lpf_down #(.W_IN(W/2), .H_IN(H1), .COEF(COEF)) u_down2 (
    .clk, .rst_n,
    .in_valid (d1n_v), .in_ready (d1n_r), .in_data (d1n_d),
    .out_valid (d2_v), .out_ready (d2_r), .out_data (d2_d));

  stream_fork u_fork2 (
    .in_valid (d2_v), .in_ready (d2_r), .in_data (d2_d),
    .a_valid (d2s_v), .a_ready (d2s_r), .a_data (d2s_d),
    .b_valid (d2n_v), .b_ready (d2n_r), .b_data (d2n_d));

  lpf_down #(.W_IN(W/4), .H_IN(H2), .COEF(COEF)) u_down3 (
    .clk, .rst_n,
    .in_valid (d2n_v), .in_ready (d2n_r), .in_data (d2n_d),
    .out_valid (d3_v), .out_ready (d3_r), .out_data (d3_d));

  // ---- Skip paths: delay adjustment and weights ----
  sync_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_D1_LINES * W / 2)) u_fifo_d1 (
    .clk, .rst_n,
    .in_valid (d1s_v), .in_ready (d1s_r), .in_data (d1s_d),
    .out_valid (d1f_v), .out_ready (d1f_r), .out_data (d1f_d));

  weight_mul #(.W(OMEGA1)) u_w1 (
    .clk, .rst_n,
    .in_valid (d1f_v), .in_ready (d1f_r), .in_data (d1f_d),
    .out_valid (d1w_v), .out_ready (d1w_r), .out_data (d1w_d));

  sync_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_D2_LINES * W / 4)) u_fifo_d2 (
    .clk, .rst_n,
    .in_valid (d2s_v), .in_ready (d2s_r), .in_data (d2s_d),
    .out_valid (d2f_v), .out_ready (d2f_r), .out_data (d2f_d));

  weight_mul #(.W(OMEGA2)) u_w2 (
    .clk, .rst_n,
    .in_valid (d2f_v), .in_ready (d2f_r), .in_data (d2f_d),
    .out_valid (d2w_v), .out_ready (d2w_r), .out_data (d2w_d));

  weight_mul #(.W(OMEGA3)) u_w3 (
    .clk, .rst_n,
    .in_valid (d3_v), .in_ready (d3_r), .in_data (d3_d),
    .out_valid (d3w_v), .out_ready (d3w_r), .out_data (d3w_d));

  // ---- Up-sampling path ----
  lpf_up #(.W_IN(W/8), .H_IN(H3), .H_OUT(H2), .COEF(COEF)) u_up3 (
    .clk, .rst_n,
    .in_valid (d3w_v), .in_ready (d3w_r), .in_data (d3w_d),
    .out_valid (u3_v), .out_ready (u3_r), .out_data (u3_d));

  stream_add u_add2 (
    .clk, .rst_n,
    .a_valid (u3_v), .a_ready (u3_r), .a_data (u3_d),
    .b_valid (d2w_v), .b_ready (d2w_r), .b_data (d2w_d),
    .out_valid (s2_v), .out_ready (s2_r), .out_data (s2_d));

  lpf_up #(.W_IN(W/4), .H_IN(H2), .H_OUT(H1), .COEF(COEF)) u_up2 (
    .clk, .rst_n,
    .in_valid (s2_v), .in_ready (s2_r), .in_data (s2_d),
    .out_valid (u2_v), .out_ready (u2_r), .out_data (u2_d));

  stream_add u_add1 (
    .clk, .rst_n,
    .a_valid (u2_v), .a_ready (u2_r), .a_data (u2_d),
    .b_valid (d1w_v), .b_ready (d1w_r), .b_data (d1w_d),
    .out_valid (s1_v), .out_ready (s1_r), .out_data (s1_d));

  lpf_up #(.W_IN(W/2), .H_IN(H1), .H_OUT(H), .COEF(COEF)) u_up1 (
    .clk, .rst_n,
    .in_valid (s1_v), .in_ready (s1_r), .in_data (s1_d),
    .out_valid (u1_v), .out_ready (u1_r), .out_data (u1_d));

  assign ibar_valid = u1_v && u1_r;
  assign ibar_data  = u1_d;

  // ---- Retinex output ----
  ssr_log u_ssr (
    .clk, .rst_n,
    .i_valid (id_v), .i_ready (id_r), .i_data (id_d),
    .l_valid (u1_v), .l_ready (u1_r), .l_data (u1_d),
    .out_valid, .out_ready, .out_data);
endmodule
