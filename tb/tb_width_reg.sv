// tb_width_reg: checks the host-written image-width register.
//
// Checks the reset value (40), that each in-range width 25..40 is stored
// with select = width-25, that values below/above the range are clamped,
// that the register holds its value while no write is strobed, and that a
// write takes effect on the clock edge that samples it.
module tb_width_reg;
  logic       clk = 0, rst_n = 0, wr_en = 0;
  logic [5:0] wr_data = '0;
  logic [5:0] width;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  width_reg dut (.*);

  always #5 clk = ~clk;

  task automatic expect_w(int w, string what);
    checks++;
    if (width !== 6'(w) || sel !== 4'(w - 25)) begin
      failures++;
      $display("%s: width %0d sel %0d, expected %0d", what, width, sel, w);
    end
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expw;
    @(posedge clk); #1 expect_w(40, "reset value");
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < 64; v++) begin
      @(negedge clk);
      wr_en = 1; wr_data = 6'(v);
      expw = (v < 25) ? 25 : (v > 40) ? 40 : v;
      @(posedge clk); #1;
      expect_w(expw, "write");
      // hold while no write is strobed
      @(negedge clk);
      wr_en = 0; wr_data = 6'(v ^ 6'h15);
      @(posedge clk); #1;
      expect_w(expw, "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
