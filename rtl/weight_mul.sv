// weight_mul: multiplies one scale of the pyramid by its weight omega_n.
//
// The weight is an 8-bit fraction of 256 (the weights of all scales sum to
// 256, i.e. to one); the product is rounded and divided by 256. The default
// 85/256 is an equal share of three scales; the weights are left to the
// user. Valid/ready stream in and out with one registered output stage.
module weight_mul
  import msr_pkg::*;
#(
  parameter logic [7:0] W = 8'd85
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
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= round_sat(32'(W) * 32'(in_data), 8);
    end
  end
endmodule
