// tb_cosim_top_full: end-to-end testbench for cosim_top with every parameter at its default:
// one 1920 x 1080 HDTV frame (scales 960 x 540, 480 x 270, 240 x 135;
// thumbnail 480 x 270).
//
// A host process writes 1 frame(s) line by line into the input
// memory while a second host process fetches every notified output block;
// the fetched pixels must equal the Retinex model of msr_ref_pkg for every
// pixel. At the same time the block-based path is fed the same frames and
// its thumbnail-size output is compared with the model applied to the 4x4
// block averages. Mechanisms that must each occur at least once: automatic
// start of a full input block, notification of a full output block, the
// output memory holding the IP core off, the host waiting for the input
// memory, a delay-adjustment FIFO holding samples, an odd line count at a
// coarse scale (by the sizes chosen), and, at the end, one block captured
// in monitoring mode (all zero: no output leaves the pyramid within the
// first line of a frame).
module tb_cosim_top_full;
  import msr_pkg::*;
  import msr_ref_pkg::*;

  localparam int W = 1920;
  localparam int H = 1080;
  localparam int FRAMES = 1;
  localparam int WATCHDOG = 12000000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic h_wr_valid = 1'b0, h_wr_ready, h_monitor = 1'b0, h_notify, h_rd_en = 1'b0, block_start;
  pix_t h_wr_data = '0, h_rd_data;
  logic bb_in_valid = 1'b0, bb_in_ready, bb_out_valid, bb_out_ready = 1'b1;
  pix_t bb_in_data = '0, bb_out_data;

  cosim_top dut (.*);

  img_t src [FRAMES];
  int expq [$], bbq [$];
  int checks = 0, failures = 0, n_rd = 0, n_bb = 0;
  int n_start = 0, n_notify = 0, n_hold = 0, n_wait = 0, max_fifo = 0, n_mon = 0;
  bit started = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (block_start) n_start++;
    if (dut.u_bridge.ip_out_valid && !dut.u_bridge.ip_out_ready) n_hold++;
    if (h_wr_valid && !h_wr_ready) n_wait++;
    if (int'(dut.u_msr.u_fifo_d1.count) > max_fifo) max_fifo = int'(dut.u_msr.u_fifo_d1.count);
  end

  always @(posedge clk) if (rst_n && bb_out_valid && bb_out_ready) begin
    checks++;
    if (n_bb >= bbq.size() || int'(bb_out_data) != bbq[n_bb]) begin
      failures++;
      if (failures < 10) $display("block path output %0d: got %0d", n_bb, bb_out_data);
    end
    n_bb++;
  end
  always @(negedge clk) bb_out_ready <= ($urandom_range(0, 4) != 0);

  task automatic host_write(input int f, input int nwords);
    for (int i = 0; i < nwords; i++) begin
      @(negedge clk);
      h_wr_valid = 1'b1;
      h_wr_data  = pix_t'(src[f][i]);
      #1;
      while (!h_wr_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    h_wr_valid = 1'b0;
  endtask

  task automatic host_fetch(input int nwords);
    while (n_rd < nwords) begin
      while (!h_notify) @(negedge clk);
      n_notify++;
      for (int i = 0; i < W; i++) begin
        @(negedge clk);
        h_rd_en = 1'b1;
        checks++;
        if (int'(h_rd_data) != expq[n_rd]) begin
          failures++;
          if (failures < 10) $display("pixel %0d (line %0d): got %0d expected %0d", n_rd, n_rd / W, h_rd_data, expq[n_rd]);
        end
        n_rd++;
      end
      @(negedge clk);
      h_rd_en = 1'b0;
    end
  endtask

  task automatic bb_feed();
    for (int f = 0; f < FRAMES; f++)
      foreach (src[f][i]) begin
        @(negedge clk);
        bb_in_valid = 1'b0;
        while ($urandom_range(0, 5) == 0) @(negedge clk);
        bb_in_valid = 1'b1;
        bb_in_data  = pix_t'(src[f][i]);
        #1;
        while (!bb_in_ready) begin @(negedge clk); #1; end
      end
    @(negedge clk);
    bb_in_valid = 1'b0;
  endtask

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      img_t e, t;
      src[f] = picture(W, H, 5 + f);
      e = retinex_msr(src[f], W, H);
      foreach (e[i]) expq.push_back(e[i]);
      t = avg4(src[f], W, H);
      e = retinex_msr(t, W / 4, H / 4);
      foreach (e[i]) bbq.push_back(e[i]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      for (int f = 0; f < FRAMES; f++) host_write(f, W * H);
      host_fetch(W * H * FRAMES);
      bb_feed();
    join
    while (n_bb < bbq.size()) @(negedge clk);
    // monitoring mode: one line, one captured block
    h_monitor = 1'b1;
    host_write(0, W);
    while (!h_notify) @(negedge clk);
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      h_rd_en = 1'b1;
      checks++;
      if (h_rd_data != '0) failures++;
    end
    @(negedge clk);
    h_rd_en = 1'b0;
    n_mon++;
    $display("blocks started %0d, notified %0d, IP held off %0d cycles, host waited %0d cycles, max D1 FIFO %0d, monitor blocks %0d",
             n_start, n_notify, n_hold, n_wait, max_fifo, n_mon);
    checks += 7;
    if (n_start != FRAMES * H + 1) failures++;
    if (n_notify != FRAMES * H) failures++;
    if (n_hold == 0) failures++;
    if (n_wait == 0) failures++;
    if (max_fifo == 0) failures++;
    if (n_mon != 1) failures++;
    if (n_bb != bbq.size()) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d pixels, %0d of %0d block-path pixels", n_rd, expq.size(), n_bb, bbq.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
