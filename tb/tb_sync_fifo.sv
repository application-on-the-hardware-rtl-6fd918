// tb_sync_fifo: self-checking testbench for sync_fifo.
//
// Random pushes and pops against a queue model on a FIFO of depth 5 (not a
// power of two). Checks the data order, that in_ready falls exactly when
// the FIFO holds DEPTH words and that out_valid falls exactly when it is
// empty; both the full and the empty case must occur.
module tb_sync_fifo;
  localparam int DEPTH = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [7:0] in_data = '0, out_data;
  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                            .out_valid, .out_ready, .out_data);

  int q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // bias towards filling in the first half, draining in the second
      in_valid  = ($urandom_range(0, 9) < ((i / 250) % 2 ? 3 : 7));
      out_ready = ($urandom_range(0, 9) < ((i / 250) % 2 ? 7 : 3));
      in_data   = 8'($urandom);
      #1;
      checks += 2;
      if (in_ready != (q.size() < DEPTH)) failures++;
      if (out_valid != (q.size() > 0)) failures++;
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      if (out_valid) begin
        checks++;
        if (int'(out_data) != q[0]) failures++;
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(int'(in_data));
    end
    checks += 2;
    if (n_full == 0) failures++;
    if (n_empty == 0) failures++;
    $display("full %0d cycles, empty %0d cycles", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
