// tb_thinning_processor: end-to-end test of the thinning processor at its
// default parameters (width range 25..40).
//
// The testbench plays the host: for every image it writes the width, streams
// the image in raster order followed by 2*width+3 blank flush pixels, reads
// the result on pix_out and feeds it back for the next iteration. Each pass
// is compared pixel by pixel (pix_out and the remove flag) with the
// software reference in thin_ref_pkg. Images of widths 25, 27, 30, 32, 38
// and 40, an out-of-range width request and random strobe gaps are used. The
// testbench counts how often each mechanism happened and fails if one never
// did: removal by a thinning template, a pixel kept by a 1x4/4x1 window,
// each trimming template, a width switch, a clamped width request, a strobe
// gap. A continuous pass must take exactly H*W + 2*W + 3 clocks.
module tb_thinning_processor;
  import thin_pkg::*;
  import thin_ref_pkg::*;

  logic       clk = 0, rst_n = 0, width_wr = 0, pix_en = 0, pix_in = 0;
  logic [5:0] width_data = '0;
  logic       pix_out;
  hit_t       hit_out;
  logic [5:0] width;
  int checks = 0, failures = 0;

  thinning_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  stats_t st;
  int n_width_switch = 0, n_clamp = 0, n_gap = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic set_width(int req, int expect_w);
    int prev_w = width;
    @(negedge clk);
    width_wr = 1; width_data = 6'(req);
    @(negedge clk);
    width_wr = 0;
    check(width == 6'(expect_w), $sformatf("width register %0d, expected %0d", width, expect_w));
    if (width != 6'(prev_w)) n_width_switch++;
    if (req != expect_w) n_clamp++;
  endtask

  // Stream one image through the processor; return the result and the
  // remove flags. gap_pct = chance of an idle clock between strobes.
  task automatic run_pass(thin_image im, int gap_pct, output thin_image res,
                          output bit rem [64][64], output int cycles);
    int total = im.h * im.w, lat = 2 * im.w + 3, s = 0;
    res = new(im.h, im.w);
    cycles = 0;
    while (s < total + lat) begin
      @(negedge clk);
      if (gap_pct > 0 && $urandom_range(0, 99) < gap_pct) begin
        pix_en = 0;
        n_gap++;
      end else begin
        pix_en = 1;
        pix_in = (s < total) ? im.px[s / im.w][s % im.w] : 1'b0;
      end
      @(posedge clk);
      cycles++;
      if (pix_en) begin
        s++;
        #1;
        if (s > lat) begin
          int k = s - lat - 1;
          res.px[k / im.w][k % im.w] = pix_out;
          rem[k / im.w][k % im.w]    = hit_out.remove;
        end
      end
    end
    @(negedge clk) pix_en = 0;
  endtask

  task automatic thin_and_check(thin_image im, int iters, int gap_pct, string name);
    thin_image cur = im, got, exp;
    bit rem [64][64];
    int cycles, bad;
    for (int it = 1; it <= iters; it++) begin
      exp = cur.pass(st);
      run_pass(cur, gap_pct, got, rem, cycles);
      bad = 0;
      for (int r = 0; r < im.h; r++)
        for (int c = 0; c < im.w; c++) begin
          if (got.px[r][c] != exp.px[r][c]) bad++;
          if (rem[r][c] != (cur.px[r][c] && !exp.px[r][c])) bad++;
        end
      check(bad == 0, $sformatf("%s iteration %0d: %0d pixel mismatches", name, it, bad));
      if (gap_pct == 0)
        check(cycles == im.h * im.w + 2 * im.w + 3,
              $sformatf("%s: pass took %0d clocks, expected %0d", name, cycles,
                        im.h * im.w + 2 * im.w + 3));
      if (bad != 0) begin cur.show("input"); exp.show("expected"); got.show("got"); end
      cur = got;
    end
    cur.show($sformatf("%s after %0d iterations", name, iters));
  endtask

  initial begin
    thin_image im;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    check(width == 6'd40, "reset width is 40");

    set_width(25, 25);
    im = glyph_l(22, 25);
    thin_and_check(im, 3, 0, "L stroke, width 25");

    set_width(32, 32);
    im = glyph_noise(30, 32, 45);
    thin_and_check(im, 3, 30, "random blobs, width 32, strobe gaps");

    set_width(38, 38);
    im = glyph_kim(38, 38);
    thin_and_check(im, 4, 0, "roof-and-bars glyph, width 38");

    set_width(63, 40);              // out of range: clamped to 40
    im = glyph_t(35, 40);
    thin_and_check(im, 5, 10, "T, width 40");

    set_width(30, 30);
    im = glyph_gallery(16, 30);
    thin_and_check(im, 1, 0, "template gallery, width 30");

    set_width(27, 27);
    im = glyph_noise(20, 27, 25);
    thin_and_check(im, 2, 0, "sparse noise, width 27");

    $display("mechanisms: thin-removed %0d, saved by 1x4/4x1 %0d, trim end-point %0d, trim extended %0d, trim diagonal %0d, width switches %0d, clamped widths %0d, strobe gaps %0d",
             st.thin_removed, st.saved, st.trim_endpoint, st.trim_extended, st.trim_diagonal,
             n_width_switch, n_clamp, n_gap);
    check(st.thin_removed > 0, "thinning removal never happened");
    check(st.saved > 0, "1x4/4x1 saving never happened");
    for (int k = 0; k < 10; k++) begin
      $display("  trimming template %0d fired %0d times", k, st.trim_each[k]);
      check(st.trim_each[k] > 0, $sformatf("trimming template %0d never fired", k));
    end
    check(n_width_switch > 0, "width switch never happened");
    check(n_clamp > 0, "width clamp never happened");
    check(n_gap > 0, "strobe gap never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
