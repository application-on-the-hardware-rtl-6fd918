// line_delay: a delay of DEPTH samples, used as the (half-)line delay of the
// line-based filters.
//
// A circular buffer of DEPTH words with one pointer. On every cycle with
// en high the word at the pointer (written DEPTH enabled cycles earlier) is
// presented on dout and replaced by din, and the pointer advances, wrapping
// at DEPTH. dout is therefore the sample one line back in the same column
// when en is asserted once per pixel of a DEPTH-wide line. The read is
// asynchronous (read-before-write); the stored words are not reset, so a
// user must ignore dout until DEPTH samples have been written (the filters
// mask those lines with their line counter). DEPTH = 960 is half of an
// HDTV line: the X filter has already halved the line length.
module line_delay #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 960
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (en) begin
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end
endmodule
