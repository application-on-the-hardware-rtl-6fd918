// fir_x_down: horizontal 9-tap Gaussian low-pass with down-sampling by 2,
// in polyphase form.
//
// The input line is split into its even samples e[j] = x[2j] and odd
// samples o[j] = x[2j+1]. The even-indexed taps act on the odd phase and the
// odd-indexed taps on the even phase, and the two sub-filter results are
// summed:
//   y[m] = sum_{i=0..4} h[2i] o[m-i] + sum_{i=0..3} h[2i+1] e[m-i]
//        = sum_{k=0..8}  h[k] x[2m+1-k]
// so samples that down-sampling would throw away are never computed and
// both sub-filters run at half the pixel rate. The filter is causal: y[m]
// leaves one cycle after x[2m+1] is accepted. Samples left of the line start
// count as zero (the phase histories are cleared at each line start). The
// sum is rounded, divided by 256 and saturated to 8 bits.
//
// Interface: valid/ready stream in (W_IN pixels per line, raster order),
// valid/ready stream out (W_IN/2 pixels per line). One registered output
// stage; in_ready = !out_valid || out_ready.
module fir_x_down
  import msr_pkg::*;
#(
  parameter int unsigned W_IN = 1920,
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
  localparam int unsigned CW = $clog2(W_IN);

  logic [CW-1:0] col;
  pix_t          even_q;
  pix_t          o_sr [4];   // o[m-1] .. o[m-4]
  pix_t          e_sr [3];   // e[m-1] .. e[m-3]
  logic          fire, odd;
  logic [31:0]   acc;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign odd      = col[0];

  // Even-tap sub-filter on the odd phase plus odd-tap sub-filter on the even phase.
  always_comb begin
    acc = 32'(COEF[0]) * 32'(in_data) + 32'(COEF[1]) * 32'(even_q);
    for (int i = 1; i <= 4; i++) acc += 32'(COEF[2*i]) * 32'(o_sr[i-1]);
    for (int i = 1; i <= 3; i++) acc += 32'(COEF[2*i+1]) * 32'(e_sr[i-1]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      even_q    <= '0;
      for (int i = 0; i < 4; i++) o_sr[i] <= '0;
      for (int i = 0; i < 3; i++) e_sr[i] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        col <= (col == CW'(W_IN - 1)) ? '0 : col + 1'b1;
        if (!odd) begin
          even_q <= in_data;
          if (col == '0) begin
            for (int i = 0; i < 4; i++) o_sr[i] <= '0;
            for (int i = 0; i < 3; i++) e_sr[i] <= '0;
          end
        end else begin
          out_valid <= 1'b1;
          out_data  <= round_sat(acc, 8);
          o_sr[0] <= in_data;
          for (int i = 1; i < 4; i++) o_sr[i] <= o_sr[i-1];
          e_sr[0] <= even_q;
          for (int i = 1; i < 3; i++) e_sr[i] <= e_sr[i-1];
        end
      end
    end
  end
endmodule
