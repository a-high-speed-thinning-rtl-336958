// thinning_processor: variable-width, one-pass parallel thinning processor.
//
// A binary image is streamed in one pixel per strobe in raster order. The
// neighbour pixel generator keeps a 4x4 window over the stream whose line
// length is the image width held in the width register, and the thinning
// logic decides for the window centre whether it survives this pass. The
// surviving pixel is registered and leaves on pix_out. One pass through the
// processor is one iteration of the algorithm; repeated iterations are made
// by streaming the result back in (the host does this), with the same width.
// This structure (width register written by the host in one write, shift
// registers with width multiplexers, template logic) follows the original
// board; the pixel strobe, the output register and reset are choices of this
// design.
//
// Interface and timing:
//   width_wr/width_data : host write of the image width (25..40, clamped);
//                         takes effect on the next clock. Change it only
//                         between images.
//   pix_en/pix_in       : pix_in is taken on each clock with pix_en = 1.
//                         With pix_en held at 1 the processor accepts and
//                         delivers one pixel every clock.
//   pix_out             : the result for the pixel given 2*width+3 strobes
//                         earlier; it changes only on strobes. After the last
//                         image pixel the host sends 2*width+3 more (zero)
//                         pixels to flush the result out.
//   hit_out             : status flags of the template families that fired
//                         for the pixel now on pix_out (thin, save, trim,
//                         remove); for monitoring only.
// Images must have a blank border of at least one pixel on every side (see
// neighbor_gen) and are at most MAX_WIDTH pixels wide; narrower images are
// padded with blank columns up to MIN_WIDTH.
module thinning_processor #(
  parameter int unsigned MIN_WIDTH = thin_pkg::MIN_WIDTH_DEF,
  parameter int unsigned MAX_WIDTH = thin_pkg::MAX_WIDTH_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       width_wr,
  input  logic [5:0] width_data,
  input  logic       pix_en,
  input  logic       pix_in,
  output logic       pix_out,
  output thin_pkg::hit_t hit_out,  // which template families fired for pix_out
  output logic [5:0] width
);

  localparam int unsigned SEL_W = $clog2(MAX_WIDTH - MIN_WIDTH + 1);

  logic [SEL_W-1:0] sel;
  thin_pkg::win_t   win;
  thin_pkg::hit_t   hit;
  logic             thin_pix;

  width_reg #(.MIN_WIDTH(MIN_WIDTH), .MAX_WIDTH(MAX_WIDTH)) u_width (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (width_wr),
    .wr_data (width_data),
    .width   (width),
    .sel     (sel)
  );

  neighbor_gen #(.MIN_WIDTH(MIN_WIDTH), .MAX_WIDTH(MAX_WIDTH)) u_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (pix_en),
    .sel      (sel),
    .pix_in   (pix_in),
    .win      (win)
  );

  thinning_logic u_logic (
    .win     (win),
    .pix_out (thin_pix),
    .hit     (hit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_out <= 1'b0;
      hit_out <= '0;
    end else if (pix_en) begin
      pix_out <= thin_pix;
      hit_out <= hit;
    end
  end

endmodule
