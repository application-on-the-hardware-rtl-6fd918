// cosim_bridge: the FPGA-resident end of the hardware/software
// co-simulation link, with line-based input and output memories.
//
// The host does not move whole frames: it sends one block of BLOCK_WORDS
// pixels (one HDTV line by default) at a time. The input memory accepts host
// writes (h_wr_valid/h_wr_ready, sequential addresses) until it is full;
// then it starts the IP core by itself and streams the block out on ip_in_*,
// after which it accepts the next block. IP-core results are written into
// the output memory; when it holds BLOCK_WORDS words it raises h_notify and
// holds the IP core off (ip_out_ready low) until the host has fetched all
// words with h_rd_en (h_rd_data shows the next word, no read latency).
//
// Monitoring mode (h_monitor high): from the cycle a block starts streaming
// into the IP core, the output memory records the IP output on every clock,
// zero in cycles without a valid output, so the host sees the processing
// delay as the position of the first non-zero words. The IP core is never
// held off in this mode; outputs that find the memory full are dropped.
// h_monitor should be changed only while both memories are idle.
//
// Both memories are one line of 8-bit words, small enough for one block RAM
// each. The host must keep sending blocks while it waits for h_notify: the
// IP core's output lags its input by several lines.
module cosim_bridge
  import msr_pkg::*;
#(
  parameter int unsigned BLOCK_WORDS = 1920
) (
  input  logic clk,
  input  logic rst_n,
  // host link
  input  logic h_wr_valid,
  output logic h_wr_ready,
  input  pix_t h_wr_data,
  input  logic h_monitor,
  output logic h_notify,
  input  logic h_rd_en,
  output pix_t h_rd_data,
  // target IP core
  output logic ip_in_valid,
  input  logic ip_in_ready,
  output pix_t ip_in_data,
  input  logic ip_out_valid,
  output logic ip_out_ready,
  input  pix_t ip_out_data,
  // one-cycle pulse when a block starts into the IP core
  output logic block_start
);
  localparam int unsigned AW = $clog2(BLOCK_WORDS);
  localparam logic [AW-1:0] LAST = AW'(BLOCK_WORDS - 1);

  typedef enum logic {IN_LOAD, IN_RUN} in_state_e;
  typedef enum logic {OUT_COLLECT, OUT_FULL} out_state_e;

  pix_t       in_mem  [BLOCK_WORDS];
  pix_t       out_mem [BLOCK_WORDS];
  in_state_e  in_state;
  out_state_e out_state;
  logic [AW-1:0] in_wp, in_rp, out_wp, out_rp;
  logic       mon_armed;
  logic       wr_fire, ip_in_fire, out_write, rd_fire;
  pix_t       out_word;

  assign h_wr_ready  = (in_state == IN_LOAD);
  assign wr_fire     = h_wr_valid && h_wr_ready;
  assign ip_in_valid = (in_state == IN_RUN);
  assign ip_in_data  = in_mem[in_rp];
  assign ip_in_fire  = ip_in_valid && ip_in_ready;
  assign block_start = wr_fire && (in_wp == LAST);

  assign h_notify  = (out_state == OUT_FULL);
  assign h_rd_data = out_mem[out_rp];
  assign rd_fire   = h_rd_en && h_notify;

  always_comb begin
    if (h_monitor) begin
      ip_out_ready = 1'b1;
      out_write    = (out_state == OUT_COLLECT) && mon_armed;
      out_word     = ip_out_valid ? ip_out_data : '0;
    end else begin
      ip_out_ready = (out_state == OUT_COLLECT);
      out_write    = ip_out_valid && ip_out_ready;
      out_word     = ip_out_data;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_fire)   in_mem[in_wp]   <= h_wr_data;
    if (out_write) out_mem[out_wp] <= out_word;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_state  <= IN_LOAD;
      out_state <= OUT_COLLECT;
      in_wp     <= '0;
      in_rp     <= '0;
      out_wp    <= '0;
      out_rp    <= '0;
      mon_armed <= 1'b0;
    end else begin
      // input memory
      if (wr_fire) begin
        in_wp <= (in_wp == LAST) ? '0 : in_wp + 1'b1;
        if (in_wp == LAST) in_state <= IN_RUN;
      end
      if (ip_in_fire) begin
        in_rp <= (in_rp == LAST) ? '0 : in_rp + 1'b1;
        if (in_rp == LAST) in_state <= IN_LOAD;
      end
      // output memory
      if (block_start && h_monitor && out_state == OUT_COLLECT) mon_armed <= 1'b1;
      if (out_write) begin
        out_wp <= (out_wp == LAST) ? '0 : out_wp + 1'b1;
        if (out_wp == LAST) begin
          out_state <= OUT_FULL;
          mon_armed <= 1'b0;
        end
      end
      if (rd_fire) begin
        out_rp <= (out_rp == LAST) ? '0 : out_rp + 1'b1;
        if (out_rp == LAST) out_state <= OUT_COLLECT;
      end
    end
  end

  // The host writes only into an input memory that is loading.
  a_wr_only_when_loading: assert property (@(posedge clk) disable iff (!rst_n)
                                           ip_in_fire |-> in_state == IN_RUN);
endmodule
