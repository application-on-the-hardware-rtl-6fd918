// stream_fork: sends every sample of one valid/ready stream to two
// consumers. A sample is taken only when both consumers can take it in the
// same cycle, so the two copies stay in step. Combinational, no storage.
module stream_fork
  import msr_pkg::*;
(
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_data,
  output logic a_valid,
  input  logic a_ready,
  output pix_t a_data,
  output logic b_valid,
  input  logic b_ready,
  output pix_t b_data
);
  assign in_ready = a_ready && b_ready;
  assign a_valid  = in_valid && b_ready;
  assign b_valid  = in_valid && a_ready;
  assign a_data   = in_data;
  assign b_data   = in_data;
endmodule
