// tb_fir_y_down: self-checking testbench for fir_y_down.
//
// A second instance with PACKED_DELAYS = 1 runs on the same stream (its
// output register must match the first instance on every cycle).
// Streams 16-pixel lines, 13 per frame (odd, so the last-line rule is
// exercised), through the vertical filter with its eight line delays.
// Frame 0 runs at full rate (input always valid, output always ready) and
// checks the rate: one input pixel per cycle with no stall. Later frames use random
// gaps on both handshakes. Every output pixel is compared with a model
// computed from the filter equations in msr_ref_pkg.
module tb_fir_y_down;
  import msr_pkg::*;
  import msr_ref_pkg::*;

  localparam int W = 16;
  localparam int H = 13;
  localparam int FRAMES = 3;
  localparam int WATCHDOG = 30000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  pix_t in_data = '0, out_data;

  fir_y_down #(.W_IN(W), .H_IN(H)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  logic p_valid, p_ready;
  pix_t p_data;
  int   n_pk = 0;
  fir_y_down #(.W_IN(W), .H_IN(H), .PACKED_DELAYS(1'b1)) dut_packed (
    .clk, .rst_n, .in_valid, .in_ready (p_ready), .in_data,
    .out_valid (p_valid), .out_ready, .out_data (p_data));
  always @(posedge clk) if (rst_n) begin
    n_pk++;
    if (p_ready != in_ready || p_valid != out_valid || (out_valid && p_data != out_data)) begin
      failures++;
      if (failures < 10) $display("packed-delay instance differs at cycle %0d", cyc);
    end
  end

  img_t src [FRAMES];
  int   expq [$];
  int   checks = 0, failures = 0, n_out = 0, n_exp = 0;
  int   cyc = 0, in_stall0 = 0, out_gap0 = 0, first0 = -1, last0 = -1;
  bit   frame0 = 1'b1;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (n_out < expq.size()) begin
      checks++;
      if (int'(out_data) != expq[n_out]) begin
        failures++;
        if (failures < 10) $display("mismatch at output %0d: got %0d expected %0d", n_out, out_data, expq[n_out]);
      end
    end else begin
      failures++;
      $display("unexpected extra output %0d", n_out);
    end
    if (n_out < W*((H+1)/2)) begin
      if (first0 < 0) first0 = cyc;
      last0 = cyc;
    end
    n_out++;
  end

  always @(negedge clk) if (!frame0) out_ready <= ($urandom_range(0, 3) != 0);

  // Count stalls during the full-rate frame.
  always @(posedge clk) if (rst_n && frame0 && in_valid && !in_ready) in_stall0++;
  always @(posedge clk) if (rst_n && first0 >= 0 && n_out < W*((H+1)/2) && !out_valid) out_gap0++;

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      img_t e;
      src[f] = picture(W, H, 17 + f);
      e = down_y(src[f], W, H);
      foreach (e[i]) expq.push_back(e[i]);
    end
    n_exp = expq.size();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      foreach (src[f][i]) begin
        @(negedge clk);
        if (f > 0) begin
          in_valid = 1'b0;
          while ($urandom_range(0, 3) == 0) @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = pix_t'(src[f][i]);
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      if (f == 0) begin
        while (n_out < W*((H+1)/2)) @(negedge clk);
        frame0 = 1'b0;
      end
    end
    while (n_out < n_exp) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++;
    if (n_out != n_exp) failures++;
    checks += n_pk;
    checks++;
    if (in_stall0 != 0) begin
      failures++;
      $display("input stalled %0d cycles at full rate", in_stall0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d outputs", n_out, n_exp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
