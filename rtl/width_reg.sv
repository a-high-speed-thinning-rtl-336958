// width_reg: image-width register written by the host.
//
// The host sets the width of the image it is about to stream with a single
// write; from the next clock on, every line delay selects that length. The
// register keeps the width itself and the multiplexer select derived from it
// (sel = width - MIN_WIDTH, 0..15 for the 25..40 range). A value outside
// MIN_WIDTH..MAX_WIDTH is clamped to the nearest end of the range. Reset
// loads MAX_WIDTH. Clamping and the reset value are choices of this design;
// the single-write width setting follows the original board.
//
// Timing: width/sel change on the clock edge that samples wr_en = 1.
module width_reg #(
  parameter int unsigned MIN_WIDTH = thin_pkg::MIN_WIDTH_DEF,
  parameter int unsigned MAX_WIDTH = thin_pkg::MAX_WIDTH_DEF,
  localparam int unsigned SEL_W = $clog2(MAX_WIDTH - MIN_WIDTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,     // host write strobe
  input  logic [5:0]       wr_data,   // requested width in pixels
  output logic [5:0]       width,     // current width in pixels
  output logic [SEL_W-1:0] sel        // multiplexer select, width - MIN_WIDTH
);

  logic [5:0] clamped;

  always_comb begin
    if (int'(wr_data) < int'(MIN_WIDTH))      clamped = 6'(MIN_WIDTH);
    else if (int'(wr_data) > int'(MAX_WIDTH)) clamped = 6'(MAX_WIDTH);
    else                                      clamped = wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     width <= 6'(MAX_WIDTH);
    else if (wr_en) width <= clamped;
  end

  assign sel = SEL_W'(width - 6'(MIN_WIDTH));

  // The stored width never leaves the range the multiplexers can select.
  a_width_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(width) >= int'(MIN_WIDTH) && int'(width) <= int'(MAX_WIDTH));

endmodule
