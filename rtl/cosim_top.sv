// cosim_top: FPGA side of a Simulink/FPGA co-simulation of a multi-scale
// Retinex picture enhancer for HDTV.
//
// Pixel-based path: the host link (cosim_bridge) moves one block of
// BLOCK_LINES lines (one by default, as in the published design) at a time
// between the PC and two one-block memories; FRAME_H must be a multiple of
// BLOCK_LINES; the input line streams into
// msr_core, whose Retinex output fills the output memory and is fetched by
// the host. Nothing on the FPGA holds a frame.
//
// Block-based path, side by side with its own stream ports: block_avg4x4
// turns the LINE_W x FRAME_H picture into a thumbnail of 4x4 block averages
// and a second msr_core enhances the thumbnail (LINE_W/4 x FRAME_H/4).
//
// Ports: clock, synchronous active-low reset, the host link (see
// cosim_bridge) and two valid/ready pixel streams for the block path.
// LINE_W must be a multiple of 32 (the thumbnail width is divided by 8).
module cosim_top
  import msr_pkg::*;
#(
  parameter int unsigned LINE_W  = 1920,
  parameter int unsigned FRAME_H = 1080,
  parameter int unsigned BLOCK_LINES = 1
) (
  input  logic clk,
  input  logic rst_n,
  // host link, pixel-based MSR
  input  logic h_wr_valid,
  output logic h_wr_ready,
  input  pix_t h_wr_data,
  input  logic h_monitor,
  output logic h_notify,
  input  logic h_rd_en,
  output pix_t h_rd_data,
  output logic block_start,
  // block-based MSR
  input  logic bb_in_valid,
  output logic bb_in_ready,
  input  pix_t bb_in_data,
  output logic bb_out_valid,
  input  logic bb_out_ready,
  output pix_t bb_out_data
);
  logic ip_in_valid, ip_in_ready, ip_out_valid, ip_out_ready;
  pix_t ip_in_data, ip_out_data;
  logic th_valid, th_ready;
  pix_t th_data;
  logic unused_ibar_v, unused_bb_ibar_v;
  pix_t unused_ibar_d, unused_bb_ibar_d;

  cosim_bridge #(.BLOCK_WORDS(LINE_W * BLOCK_LINES)) u_bridge (
    .clk, .rst_n,
    .h_wr_valid, .h_wr_ready, .h_wr_data, .h_monitor, .h_notify,
    .h_rd_en, .h_rd_data,
    .ip_in_valid, .ip_in_ready, .ip_in_data,
    .ip_out_valid, .ip_out_ready, .ip_out_data,
    .block_start);

  msr_core #(.W(LINE_W), .H(FRAME_H)) u_msr (
    .clk, .rst_n,
    .in_valid (ip_in_valid), .in_ready (ip_in_ready), .in_data (ip_in_data),
    .out_valid (ip_out_valid), .out_ready (ip_out_ready), .out_data (ip_out_data),
    .ibar_valid (unused_ibar_v), .ibar_data (unused_ibar_d));

  block_avg4x4 #(.W_IN(LINE_W)) u_thumb (
    .clk, .rst_n,
    .in_valid (bb_in_valid), .in_ready (bb_in_ready), .in_data (bb_in_data),
    .out_valid (th_valid), .out_ready (th_ready), .out_data (th_data));

  msr_core #(.W(LINE_W / 4), .H(FRAME_H / 4)) u_msr_thumb (
    .clk, .rst_n,
    .in_valid (th_valid), .in_ready (th_ready), .in_data (th_data),
    .out_valid (bb_out_valid), .out_ready (bb_out_ready), .out_data (bb_out_data),
    .ibar_valid (unused_bb_ibar_v), .ibar_data (unused_bb_ibar_d));
endmodule
