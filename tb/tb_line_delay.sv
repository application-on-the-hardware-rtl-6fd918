// tb_line_delay: self-checking testbench for line_delay.
//
// Writes random words with random gaps in the enable and checks that each
// word comes back on dout exactly DEPTH enabled cycles later.
module tb_line_delay;
  localparam int DEPTH = 7;
  localparam int N = 400;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] din = '0, dout;
  always #5 clk = ~clk;

  line_delay #(.WIDTH(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .en, .din, .dout);

  int hist [$];
  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      din = 8'($urandom);
      if (en) begin
        if (hist.size() >= DEPTH) begin
          checks++;
          if (int'(dout) != hist[hist.size() - DEPTH]) begin
            failures++;
            $display("sample %0d: got %0d expected %0d", hist.size(), dout, hist[hist.size() - DEPTH]);
          end
        end
        hist.push_back(int'(din));
      end
    end
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
