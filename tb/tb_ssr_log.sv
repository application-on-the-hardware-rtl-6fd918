// tb_ssr_log: self-checking testbench for ssr_log.
//
// A pixel stream I and an illumination stream Ibar with random gaps and a
// random output ready. The n-th output must equal
// clamp(128 + 2 * (log2(I) - log2(Ibar)), 0, 255) with log2 in 1/32 units
// computed by msr_ref_pkg; both clipping limits must be reached.
module tb_ssr_log;
  import msr_pkg::*;
  import msr_ref_pkg::*;
  localparam int N = 500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic a_valid = 1'b0, a_ready, b_valid = 1'b0, b_ready, out_valid, out_ready = 1'b0;
  pix_t a_data = '0, b_data = '0, out_data;
  always #5 clk = ~clk;

  ssr_log dut (.clk, .rst_n, .i_valid(a_valid), .i_ready(a_ready), .i_data(a_data), .l_valid(b_valid), .l_ready(b_ready), .l_data(b_data),
                  .out_valid, .out_ready, .out_data);

  int aq [$], bq [$];
  int checks = 0, failures = 0, n_out = 0, n_sat = 0, n_low = 0;

  task automatic drive_a();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      a_valid = 1'b0;
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      a_valid = 1'b1;
      a_data  = pix_t'($urandom_range(0, 255));
      aq.push_back(int'(a_data));
      #1;
      while (!a_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    a_valid = 1'b0;
  endtask

  task automatic drive_b();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      b_valid = 1'b0;
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      b_valid = 1'b1;
      b_data  = pix_t'($urandom_range(0, 255));
      bq.push_back(int'(b_data));
      #1;
      while (!b_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    b_valid = 1'b0;
  endtask

  always @(negedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    e = 128 + 2 * (log2q(aq[n_out]) - log2q(bq[n_out]));
    if (e >= 255) begin e = 255; n_sat++; end
    if (e <= 0) begin e = 0; n_low++; end
    checks++;
    if (int'(out_data) != e) begin
      failures++;
      $display("output %0d: got %0d expected %0d", n_out, out_data, e);
    end
    n_out++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      drive_a();
      drive_b();
    join
    while (n_out < N) @(negedge clk);
    checks += 2;
    if (n_sat == 0 || n_low == 0) failures++;
    repeat (10) @(negedge clk);
    if (n_out != N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
