// tb_neighbor_gen: checks the 4x4 window of the neighbour pixel generator.
//
// For each width 25..40 a random pixel stream is shifted in (with random
// strobe gaps). The testbench keeps the stream and, after every strobe,
// checks every window cell: w[r][c] must be the pixel shifted in
// (3-r)*width + (3-c) strobes before the newest, i.e. four consecutive
// image lines, four adjacent pixels each, newest line at the bottom.
module tb_neighbor_gen;
  import thin_pkg::*;

  logic       clk = 0, rst_n = 0, shift_en = 0, pix_in = 0;
  logic [3:0] sel = '0;
  win_t       win;
  int checks = 0, failures = 0;

  neighbor_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist [$];

  function automatic bit past(int k);
    return (k < hist.size()) ? hist[k] : 1'b0;
  endfunction

  initial begin
    int w;
    bit b, ok;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int wi = 0; wi < 16; wi++) begin
      sel = 4'(wi);
      w = 25 + wi;
      hist.delete();
      // refill the delay lines at the new width before checking
      for (int i = 0; i < 3 * w + 4 + 150; i++) begin
        @(negedge clk);
        shift_en = ($urandom_range(0, 4) != 0);
        b = 1'($urandom);
        pix_in = b;
        @(posedge clk); #1;
        if (shift_en) hist.push_front(b);
        if (hist.size() > 3 * w + 4) begin
          ok = 1;
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              if (win[r][c] !== past((3 - r) * w + (3 - c))) ok = 0;
          checks++;
          if (!ok) begin
            failures++;
            if (failures < 10) $display("width %0d step %0d: window %h wrong", w, i, win);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
