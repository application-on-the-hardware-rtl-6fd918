// tb_cosim_bridge: self-checking testbench for cosim_bridge.
//
// The IP core is replaced by a behavioural stand-in: it takes pixels when
// its (random) ready is high and returns x ^ 8'h5A at least LAT cycles
// later, in order, holding its output while the bridge refuses it.
// Normal mode: a host process keeps writing 12 blocks of BLOCK words while
// a second host process fetches every notified output block; all words
// must return in order, the output memory must have held the IP core off at
// least once and the host must have had to wait for the input memory.
// Monitoring mode: with the IP core always ready, one block is sent and the
// fetched block must start with exactly as many zero words as there are
// cycles between the first input and the first output of the IP core,
// followed by the results in order.
module tb_cosim_bridge;
  import msr_pkg::*;
  localparam int BLOCK = 16;
  localparam int NBLK = 12;
  localparam int LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic h_wr_valid = 1'b0, h_wr_ready, h_monitor = 1'b0, h_notify, h_rd_en = 1'b0, block_start;
  pix_t h_wr_data = '0, h_rd_data;
  logic ip_in_valid, ip_in_ready = 1'b0, ip_out_valid = 1'b0, ip_out_ready;
  pix_t ip_in_data, ip_out_data = '0;

  cosim_bridge #(.BLOCK_WORDS(BLOCK)) dut (.*);

  // behavioural IP core
  typedef struct { int t; int d; } item_t;
  item_t ipq [$];
  int cyc = 0, first_in = -1, first_out = -1;
  bit ip_rand = 1'b1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ip_out_valid && ip_out_ready) void'(ipq.pop_front());
    if (ip_in_valid && ip_in_ready) begin
      ipq.push_back('{cyc + LAT, int'(ip_in_data) ^ 8'h5A});
      if (first_in < 0) first_in = cyc;
    end
    if (ip_out_valid && first_out < 0) first_out = cyc;
  end
  always @(negedge clk) begin
    ip_in_ready  <= ip_rand ? ($urandom_range(0, 2) != 0) : 1'b1;
    ip_out_valid <= (ipq.size() > 0) && (ipq[0].t <= cyc);
    ip_out_data  <= (ipq.size() > 0) ? pix_t'(ipq[0].d) : '0;
  end

  int sent [$];
  int checks = 0, failures = 0, n_rd = 0, n_hold = 0, n_wait = 0, n_blocks = 0, n_start = 0;
  always @(posedge clk) if (rst_n && ip_out_valid && !ip_out_ready) n_hold++;
  always @(posedge clk) if (rst_n && h_wr_valid && !h_wr_ready) n_wait++;
  always @(posedge clk) if (rst_n && block_start) n_start++;

  task automatic send_block(input int base);
    for (int i = 0; i < BLOCK; i++) begin
      @(negedge clk);
      h_wr_valid = 1'b1;
      h_wr_data  = pix_t'(base + i * 7);
      sent.push_back(base + i * 7);
      #1;
      while (!h_wr_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    h_wr_valid = 1'b0;
  endtask

  task automatic fetch_block(output int words [BLOCK]);
    while (!h_notify) @(negedge clk);
    for (int i = 0; i < BLOCK; i++) begin
      @(negedge clk);
      h_rd_en = 1'b1;
      words[i] = int'(h_rd_data);
    end
    @(negedge clk);
    h_rd_en = 1'b0;
    n_blocks++;
  endtask

  initial begin
    int w [BLOCK];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---- normal mode ----
    fork
      for (int b = 0; b < NBLK; b++) send_block(b * 13);
      for (int b = 0; b < NBLK; b++) begin
        repeat ($urandom_range(0, 60)) @(negedge clk);
        fetch_block(w);
        for (int i = 0; i < BLOCK; i++) begin
          checks++;
          if (w[i] != ((sent[n_rd] & 255) ^ 8'h5A)) begin
            failures++;
            $display("block %0d word %0d: got %0d expected %0d", b, i, w[i], (sent[n_rd] & 255) ^ 8'h5A);
          end
          n_rd++;
        end
      end
    join
    checks += 3;
    if (n_hold == 0) begin failures++; $display("output memory never held the IP core off"); end
    if (n_wait == 0) begin failures++; $display("host never waited for the input memory"); end
    if (n_start != NBLK) begin failures++; $display("%0d block starts", n_start); end
    // ---- monitoring mode ----
    repeat (20) @(negedge clk);
    ip_rand = 1'b0;
    h_monitor = 1'b1;
    sent.delete();
    first_in = -1;
    first_out = -1;
    send_block(100);
    fetch_block(w);
    begin
      int k;
      k = first_out - first_in;
      checks++;
      if (k < LAT) failures++;
      for (int i = 0; i < BLOCK; i++) begin
        int e;
        e = (i < k) ? 0 : ((sent[i - k] & 255) ^ 8'h5A);
        checks++;
        if (w[i] != e) begin
          failures++;
          $display("monitor word %0d: got %0d expected %0d", i, w[i], e);
        end
      end
      $display("monitoring mode: delay %0d cycles", k);
    end
    $display("IP held off %0d cycles, host waited %0d cycles, %0d blocks fetched", n_hold, n_wait, n_blocks);
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
