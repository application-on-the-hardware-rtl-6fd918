// lpf_up: X-Y separable Gaussian interpolator with 2x2 up-sampling
// (one "x-y LPF up-sampling" stage of the pyramid), in polyphase form.
//
// Up-sampling by 2 followed by the 9-tap Gaussian is computed without the
// inserted zeros: output sample 2n uses the even taps and output 2n+1 the
// odd taps on the low-rate input,
//   z[2n]   = sum_{i=0..4} h[2i]   x[n-i]
//   z[2n+1] = sum_{i=0..3} h[2i+1] x[n-i]
// each phase normalised by 128 (its taps sum to 128), so the gain of the
// zero-stuffed filter (2 per direction) is built in. Vertical first: while
// low-rate line q arrives, four line delays give the column history, the
// even-phase line (output line 2q) goes straight on to the horizontal
// stage and the odd-phase line (output line 2q+1) is parked in a one-line
// buffer, then replayed through the horizontal stage once line q is in.
// The horizontal stage turns each sample into two output pixels.
// Rounding to 8 bits follows each direction. Samples above and left of the
// frame count as zero. H_OUT may be 2*H_IN - 1: the last odd-phase line
// is then not produced (the finer scale it meets has an odd line count).
//
// Interface: valid/ready stream in, W_IN x H_IN per frame; valid/ready
// stream out, 2*W_IN x H_OUT per frame. The output runs at up to one pixel
// per cycle; the input is taken at most every other cycle while output line
// 2q is produced and not at all while line 2q+1 is replayed.
module lpf_up
  import msr_pkg::*;
#(
  parameter int unsigned W_IN = 960,
  parameter int unsigned H_IN = 540,
  parameter int unsigned H_OUT = 2 * H_IN,
  parameter kernel_t     COEF = GAUSS9
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
  localparam int unsigned CW = $clog2(W_IN);
  localparam int unsigned RW = (H_IN > 1) ? $clog2(H_IN) : 1;
  localparam int unsigned NE = (TAPS + 1) / 2;   // even-phase taps (5)
  localparam int unsigned NO = TAPS / 2;         // odd-phase taps (4)

  localparam bit CROP = (H_OUT < 2 * H_IN);

  typedef enum logic {PH_EVEN, PH_ODD} phase_e;

  phase_e        phase;
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  pix_t          vtap [NE];       // x[q][m], x[q-1][m] .. x[q-4][m]
  pix_t          odd_line [W_IN]; // odd-phase line waiting for replay
  pix_t          hist [NE-1];     // v[m-1] .. v[m-4] of the horizontal stage
  pix_t          ye, yo, v, z_even, z_odd;
  logic [31:0]   acc_ye, acc_yo, acc_ze, acc_zo;
  logic          o_valid, p_valid;
  pix_t          o_data, p_data;
  logic          can_take, step, in_fire;

  assign vtap[0] = in_data;
  for (genvar k = 1; k < NE; k++) begin : g_ld
    line_delay #(.WIDTH(PIX_W), .DEPTH(W_IN)) u_ld (
      .clk (clk), .rst_n (rst_n), .en (in_fire),
      .din (vtap[k-1]), .dout (vtap[k])
    );
  end

  assign can_take = !o_valid || (out_ready && !p_valid);
  assign in_ready = (phase == PH_EVEN) && can_take;
  assign in_fire  = in_valid && in_ready;
  assign step     = (phase == PH_EVEN) ? in_fire : can_take;

  // Vertical polyphase sub-filters.
  always_comb begin
    acc_ye = '0;
    acc_yo = '0;
    for (int i = 0; i < NE; i++)
      if (32'(row) >= 32'(i)) acc_ye += 32'(COEF[2*i]) * 32'(vtap[i]);
    for (int i = 0; i < NO; i++)
      if (32'(row) >= 32'(i)) acc_yo += 32'(COEF[2*i+1]) * 32'(vtap[i]);
    ye = round_sat(acc_ye, 7);
    yo = round_sat(acc_yo, 7);
  end

  // Horizontal polyphase sub-filters on the selected line.
  always_comb begin
    v = (phase == PH_EVEN) ? ye : odd_line[col];
    acc_ze = 32'(COEF[0]) * 32'(v);
    acc_zo = 32'(COEF[1]) * 32'(v);
    for (int i = 1; i < NE; i++)
      if (32'(col) >= 32'(i)) acc_ze += 32'(COEF[2*i]) * 32'(hist[i-1]);
    for (int i = 1; i < NO; i++)
      if (32'(col) >= 32'(i)) acc_zo += 32'(COEF[2*i+1]) * 32'(hist[i-1]);
    z_even = round_sat(acc_ze, 7);
    z_odd  = round_sat(acc_zo, 7);
  end

  assign out_valid = o_valid;
  assign out_data  = o_data;

  always_ff @(posedge clk) begin
    if (phase == PH_EVEN && in_fire) odd_line[col] <= yo;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= PH_EVEN;
      col     <= '0;
      row     <= '0;
      o_valid <= 1'b0;
      p_valid <= 1'b0;
      o_data  <= '0;
      p_data  <= '0;
      for (int i = 0; i < NE - 1; i++) hist[i] <= '0;
    end else begin
      if (o_valid && out_ready) begin
        o_valid <= p_valid;
        o_data  <= p_data;
        p_valid <= 1'b0;
      end
      if (step) begin
        o_valid <= 1'b1;
        o_data  <= z_even;
        p_valid <= 1'b1;
        p_data  <= z_odd;
        hist[0] <= v;
        for (int i = 1; i < NE - 1; i++) hist[i] <= hist[i-1];
        if (col == CW'(W_IN - 1)) begin
          col <= '0;
          if (phase == PH_EVEN && !(CROP && row == RW'(H_IN - 1))) begin
            phase <= PH_ODD;
          end else begin
            phase <= PH_EVEN;
            row   <= (row == RW'(H_IN - 1)) ? '0 : row + 1'b1;
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  // The output pair register is never overwritten while a pixel is pending.
  a_no_drop: assert property (@(posedge clk) disable iff (!rst_n)
                              step |-> (!o_valid || (out_ready && !p_valid)));
endmodule
