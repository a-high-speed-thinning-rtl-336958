// tb_table1_workloads: the image sizes and iteration counts of the
// processor's reference measurements, run on the default-size processor.
//
// The measured set is: a 'g' of 22x28 pixels (3 iterations), an 'e' of
// 34x30 (7), a 'T' of 40x35 (5), a Chinese character of 38x38 (4) and a
// 32x30 image (4). The original character scans are not available, so each
// image is a synthetic glyph of the same size with strokes several pixels
// thick (sizes read as width x height). The 22-pixel-wide 'g' is padded with
// blank columns to the minimum width of 25. Every pass is checked against
// the software reference, and the clocks per pass must be H*W + 2*W + 3
// with the strobe held high (one pixel per clock). The number of
// 8-connected strokes must be the same before and after thinning, the
// connectivity the algorithm is meant to keep.
module tb_table1_workloads;
  import thin_pkg::*;
  import thin_ref_pkg::*;

  logic       clk = 0, rst_n = 0, width_wr = 0, pix_en = 0, pix_in = 0;
  logic [5:0] width_data = '0;
  logic       pix_out;
  hit_t       hit_out;
  logic [5:0] width;
  int checks = 0, failures = 0;
  stats_t st;

  thinning_processor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(thin_image im, int iters, string name);
    thin_image cur = im, exp, got;
    int lat = 2 * im.w + 3, total = im.h * im.w, cycles, bad, total_cycles = 0;
    @(negedge clk);
    width_wr = 1; width_data = 6'(im.w);
    @(negedge clk);
    width_wr = 0;
    check(width == 6'(im.w), $sformatf("%s: width %0d not taken", name, im.w));
    for (int it = 1; it <= iters; it++) begin
      exp = cur.pass(st);
      got = new(im.h, im.w);
      cycles = 0;
      for (int s = 1; s <= total + lat; s++) begin
        @(negedge clk);
        pix_en = 1;
        pix_in = (s <= total) ? cur.px[(s - 1) / im.w][(s - 1) % im.w] : 1'b0;
        @(posedge clk);
        cycles++;
        #1;
        if (s > lat) got.px[(s - lat - 1) / im.w][(s - lat - 1) % im.w] = pix_out;
      end
      @(negedge clk) pix_en = 0;
      bad = 0;
      for (int r = 0; r < im.h; r++)
        for (int c = 0; c < im.w; c++)
          if (got.px[r][c] != exp.px[r][c]) bad++;
      check(bad == 0, $sformatf("%s iteration %0d: %0d mismatches", name, it, bad));
      check(cycles == total + lat, $sformatf("%s: %0d clocks per pass", name, cycles));
      total_cycles += cycles;
      cur = got;
    end
    $display("%s: 8-connected components %0d before, %0d after", name, im.components(),
             cur.components());
    check(im.components() == cur.components(), $sformatf("%s: connectivity not kept", name));
    cur.show($sformatf("%s: %0d iterations, %0d clocks (%0d us at 20 MHz)", name, iters,
                       total_cycles, total_cycles / 20));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(glyph_g(28, 25),   3, "'g' 22x28 padded to 25x28");
    run(glyph_e(30, 34),   7, "'e' 34x30");
    run(glyph_t(35, 40),   5, "'T' 40x35");
    run(glyph_kim(38, 38), 4, "38x38 character");
    run(glyph_l(30, 32),   4, "32x30 image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
