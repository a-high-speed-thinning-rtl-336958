// line_delay: one row of the neighbour pixel generator.
//
// An N-bit shift register (N = MAX_WIDTH) shifts one pixel per strobe. Its
// first four stages are one row of the 4x4 window. A multiplexer with one
// input per allowed width (16 inputs for 25..40) taps stage width-1, so the
// pixel leaving through `dout` is exactly one image line older than the one
// entering: chaining these rows stacks consecutive image lines. This is the
// structure of the original board (shift register plus switchable
// multiplexer per line); the reset to zero is a choice of this design.
//
// Interface: `din` is shifted in when `shift_en` is 1. `row[0]` holds the
// newest pixel (one strobe old), row[3] the oldest. `dout` = the pixel that
// entered `width` strobes ago, where width = MIN_WIDTH + sel. All outputs
// are registered bits (dout is a multiplexer after the register).
module line_delay #(
  parameter int unsigned MIN_WIDTH = thin_pkg::MIN_WIDTH_DEF,
  parameter int unsigned MAX_WIDTH = thin_pkg::MAX_WIDTH_DEF,
  localparam int unsigned SEL_W = $clog2(MAX_WIDTH - MIN_WIDTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic [SEL_W-1:0] sel,      // width - MIN_WIDTH
  input  logic             din,
  output logic [3:0]       row,      // stages 0..3 (0 = newest)
  output logic             dout      // stage width-1
);

  logic [MAX_WIDTH-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sr <= '0;
    else if (shift_en) sr <= {sr[MAX_WIDTH-2:0], din};
  end

  // Width multiplexer: only the taps MIN_WIDTH-1 .. MAX_WIDTH-1 are selectable.
  logic [MAX_WIDTH-MIN_WIDTH:0] taps;
  assign taps = sr[MAX_WIDTH-1:MIN_WIDTH-1];

  always_comb begin
    dout = 1'b0;
    if (int'(sel) <= int'(MAX_WIDTH - MIN_WIDTH)) dout = taps[sel];
  end

  assign row = sr[3:0];

endmodule
