// tb_marker_delay: marker-band delay measurement on the MSR pyramid.
//
// The first 8 lines of the test frame are replaced by a black marker band
// (all 0) and the next 8 lines by a white band (all 255), followed by an
// ordinary picture. The black band clears the filter history and the
// white band produces a step whose position in the filtered picture shows
// how many lines the processing has shifted it. The testbench streams the
// frame through msr_core at full rate, captures the illumination estimate
// Ibar and the Retinex output, checks both against the reference model
// pixel by pixel, and measures the line where the mean of Ibar first
// passes a quarter of full scale (the step of the white band). That line must
// lie below the start of the white band (line 8): the causal pyramid shifts
// the picture down. It also checks the shift against the model and reports it.
module tb_marker_delay;
  import msr_pkg::*;
  import msr_ref_pkg::*;

  localparam int W = 64;
  localparam int H = 48;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, ibar_valid;
  pix_t in_data = '0, out_data, ibar_data;

  msr_core #(.W(W), .H(H)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                .out_valid, .out_ready, .out_data, .ibar_valid, .ibar_data);

  img_t src, e_ibar, e_out;
  int got_ibar [$], got_out [$];
  int checks = 0, failures = 0;

  always @(posedge clk) if (rst_n) begin
    if (ibar_valid) got_ibar.push_back(int'(ibar_data));
    if (out_valid && out_ready) got_out.push_back(int'(out_data));
  end

  function automatic int step_line(input int im [$]);
    for (int r = 0; r < H; r++) begin
      int s = 0;
      for (int c = 0; c < W; c++) s += im[r * W + c];
      if (s >= 64 * W) return r;
    end
    return -1;
  endfunction

  initial begin
    int ref_q [$], st, st_ref;
    src = picture(W, H, 3);
    for (int i = 0; i < 8 * W; i++) src[i] = 0;
    for (int i = 8 * W; i < 16 * W; i++) src[i] = 255;
    e_ibar = ibar(src, W, H, 85, 85, 86);
    e_out = retinex(src, e_ibar, 128, 2);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (src[i]) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data = pix_t'(src[i]);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (got_out.size() < W * H) @(negedge clk);
    repeat (10) @(negedge clk);
    checks += 2;
    if (got_ibar.size() != W * H) failures++;
    if (got_out.size() != W * H) failures++;
    for (int i = 0; i < W * H; i++) begin
      checks += 2;
      if (got_ibar[i] != e_ibar[i]) failures++;
      if (got_out[i] != e_out[i]) failures++;
    end
    st = step_line(got_ibar);
    foreach (e_ibar[i]) ref_q.push_back(e_ibar[i]);
    st_ref = step_line(ref_q);
    $display("white band starts at line 8; Ibar step at line %0d (shift %0d lines), model %0d",
             st, st - 8, st_ref);
    checks += 2;
    if (st != st_ref) failures++;
    if (st <= 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
