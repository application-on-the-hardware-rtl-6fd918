// fir_y_down: vertical 9-tap Gaussian low-pass with down-sampling by 2,
// built on a chain of eight half-line delays.
//
// Each accepted sample x[r][m] enters the first line delay; the delay
// outputs give the same column of the eight previous lines, so the nine
// samples of one column are present together and the filter is a single
// multiply-and-add:
//   y[q][m] = sum_{k=0..8} h[k] x[2q+1-k][m]
// computed only while an odd line (r = 2q+1) arrives: even lines only fill
// the delays. Lines above the top of the frame count as zero (the line
// counter masks delay outputs that still hold the previous frame or reset
// garbage), and so does the missing line below an odd line count: then the
// last line also produces an output line, ceil(H_IN/2) lines in all. The sum is rounded, divided by 256 and saturated to 8 bits.
//
// PACKED_DELAYS = 1 keeps the eight line delays in one memory of 64-bit
// words instead of eight 8-bit memories, the wide-word variant the published
// design suggests for saving block RAMs; the result is identical.
//
// Interface: valid/ready stream in (W_IN pixels per line, H_IN lines per
// frame, raster order), valid/ready stream out (W_IN pixels per line, H_IN/2
// lines, rounded up). One registered output stage; in_ready = !out_valid || out_ready.
module fir_y_down
  import msr_pkg::*;
#(
  parameter int unsigned W_IN = 960,
  parameter int unsigned H_IN = 1080,
  parameter kernel_t     COEF = GAUSS9,
  parameter bit          PACKED_DELAYS = 1'b0
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
  localparam int unsigned CW = $clog2(W_IN);
  localparam int unsigned RW = $clog2(H_IN);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  pix_t          tap [TAPS];
  logic          fire;
  logic [31:0]   acc;
  logic          last_even;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign tap[0]   = in_data;

  if (PACKED_DELAYS) begin : g_packed
    logic [(TAPS-1)*PIX_W-1:0] wide_in, wide_out;
    for (genvar k = 1; k < TAPS; k++) begin : g_slice
      assign wide_in[(k-1)*PIX_W +: PIX_W] = tap[k-1];
      assign tap[k] = wide_out[(k-1)*PIX_W +: PIX_W];
    end
    line_delay #(.WIDTH((TAPS-1)*PIX_W), .DEPTH(W_IN)) u_ld (
      .clk (clk), .rst_n (rst_n), .en (fire),
      .din (wide_in), .dout (wide_out)
    );
  end else begin : g_chain
    for (genvar k = 1; k < TAPS; k++) begin : g_ld
      line_delay #(.WIDTH(PIX_W), .DEPTH(W_IN)) u_ld (
        .clk (clk), .rst_n (rst_n), .en (fire),
        .din (tap[k-1]), .dout (tap[k])
      );
    end
  end

  // Last line of an odd line count: the window is one line further down
  // and its newest line (below the frame) is zero.
  assign last_even = (H_IN % 2 == 1) && (row == RW'(H_IN - 1));

  always_comb begin
    acc = '0;
    if (last_even) begin
      for (int k = 1; k < TAPS; k++)
        if (32'(row) >= 32'(k - 1)) acc += 32'(COEF[k]) * 32'(tap[k-1]);
    end else begin
      for (int k = 0; k < TAPS; k++)
        if (32'(row) >= 32'(k)) acc += 32'(COEF[k]) * 32'(tap[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        if (col == CW'(W_IN - 1)) begin
          col <= '0;
          row <= (row == RW'(H_IN - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
        if (row[0] || last_even) begin
          out_valid <= 1'b1;
          out_data  <= round_sat(acc, 8);
        end
      end
    end
  end
endmodule
