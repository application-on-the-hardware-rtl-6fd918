// block_avg4x4: forms the thumbnail picture for block-based MSR, one pixel
// per 4x4 block of the input, equal to the block's average.
//
// Four horizontally adjacent pixels are summed in a small accumulator;
// each quarter-line sum is added into a one-line buffer of W_IN/4 partial
// sums, which after the fourth line of a block row holds the 16-pixel sum.
// That sum is rounded and divided by 16 and leaves on the output while the
// fourth line passes, so the output is W_IN/4 x H/4 in raster order, one
// pixel per four input pixels of every fourth line. No frame height is
// needed: the block row is counted modulo 4.
//
// Interface: valid/ready stream in, valid/ready stream out, one registered
// output stage; in_ready = !out_valid || out_ready.
module block_avg4x4
  import msr_pkg::*;
#(
  parameter int unsigned W_IN = 1920
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
  localparam int unsigned NB = W_IN / 4;
  localparam int unsigned CW = $clog2(W_IN);

  logic [CW-1:0] col;
  logic [1:0]    row4;
  logic [9:0]    hsum;
  logic [11:0]   part [NB];
  logic [11:0]   total, prev;
  logic [9:0]    hnext;
  logic          fire, blk_end;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign blk_end  = (col[1:0] == 2'd3);
  assign hnext    = ((col[1:0] == 2'd0) ? 10'd0 : hsum) + 10'(in_data);
  assign prev     = (row4 == 2'd0) ? 12'd0 : part[col[CW-1:2]];
  assign total    = prev + 12'(hnext);

  always_ff @(posedge clk) begin
    if (fire && blk_end) part[col[CW-1:2]] <= total;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col       <= '0;
      row4      <= '0;
      hsum      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (fire) begin
        hsum <= hnext;
        if (col == CW'(W_IN - 1)) begin
          col  <= '0;
          row4 <= row4 + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
        if (blk_end && row4 == 2'd3) begin
          out_valid <= 1'b1;
          out_data  <= pix_t'((total + 12'd8) >> 4);
        end
      end
    end
  end
endmodule
