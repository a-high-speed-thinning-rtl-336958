// neighbor_gen: neighbour pixel generator.
//
// Pixels arrive one per strobe in raster order (left to right, top to
// bottom). Three variable-length line delays are chained, each passing a
// pixel on after exactly one image line, and a 4-bit shift register follows
// the last one. The first four stages of the three line delays and the
// 4-bit register together hold a 4x4 window: four vertically adjacent image
// lines, four horizontally adjacent pixels each. This follows the original
// generator (three N-bit shift registers with width multiplexers and a
// 4-bit shift register forming the 4x4 window).
//
// Window orientation (thin_pkg::win_t, w[row][col]):
//   row 3 = first line delay (newest line) ... row 0 = 4-bit register,
//   col 3 = newest pixel of a line ... col 0 = oldest.
// After a strobe, w[3][3] is the pixel just shifted in and w[r][c] is the
// pixel that entered (3-r)*width + (3-c) strobes earlier. The centre
// w[1][1] is therefore 2*width+2 strobes old.
//
// Image edges: the window does not know where a line ends, so a window near
// the left or right edge wraps onto the neighbouring line. Images are
// expected to carry a blank (zero) border of at least one pixel, which makes
// the wrap harmless; this requirement is a choice of this design.
module neighbor_gen #(
  parameter int unsigned MIN_WIDTH = thin_pkg::MIN_WIDTH_DEF,
  parameter int unsigned MAX_WIDTH = thin_pkg::MAX_WIDTH_DEF,
  localparam int unsigned SEL_W = $clog2(MAX_WIDTH - MIN_WIDTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic [SEL_W-1:0] sel,       // width - MIN_WIDTH
  input  logic             pix_in,
  output thin_pkg::win_t   win
);

  logic [3:0] row_q [3];    // first four stages of each line delay
  logic [3:0] chain;        // chain[i] = input of line delay i, chain[3] = into 4-bit SR
  logic [3:0] top_sr;       // the 4-bit shift register (oldest line)

  assign chain[0] = pix_in;

  for (genvar i = 0; i < 3; i++) begin : g_line
    line_delay #(.MIN_WIDTH(MIN_WIDTH), .MAX_WIDTH(MAX_WIDTH)) u_line (
      .clk      (clk),
      .rst_n    (rst_n),
      .shift_en (shift_en),
      .sel      (sel),
      .din      (chain[i]),
      .row      (row_q[i]),
      .dout     (chain[i+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        top_sr <= '0;
    else if (shift_en) top_sr <= {top_sr[2:0], chain[3]};
  end

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      win[0][c] = top_sr[3-c];
      win[1][c] = row_q[2][3-c];
      win[2][c] = row_q[1][3-c];
      win[3][c] = row_q[0][3-c];
    end
  end

endmodule
