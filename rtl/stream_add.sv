// stream_add: the adder where an up-sampled coarse scale meets the weighted
// finer scale. It pairs the n-th sample of stream a with the n-th sample of
// stream b (both in raster order of the same frame size), adds them and
// saturates to 8 bits. Both inputs are taken together, only when both are
// valid and the registered output stage has room.
module stream_add
  import msr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic a_valid,
  output logic a_ready,
  input  pix_t a_data,
  input  logic b_valid,
  output logic b_ready,
  input  pix_t b_data,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_data
);
  logic space, take;
  logic [8:0] sum;

  assign space   = !out_valid || out_ready;
  assign take    = space && a_valid && b_valid;
  assign a_ready = space && b_valid;
  assign b_ready = space && a_valid;
  assign sum     = {1'b0, a_data} + {1'b0, b_data};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (space) begin
      out_valid <= take;
      if (take) out_data <= sum[8] ? 8'd255 : sum[7:0];
    end
  end
endmodule
