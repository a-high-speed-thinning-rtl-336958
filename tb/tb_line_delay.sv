// tb_line_delay: checks one variable-length line delay.
//
// A random pixel stream is shifted in with random gaps in the strobe. For
// each of the 16 widths 25..40 the testbench keeps its own history of the
// pixels shifted in and checks after every strobe that the four window
// stages hold the last four pixels and that the multiplexer output is the
// pixel shifted in exactly `width` strobes earlier.
module tb_line_delay;
  logic       clk = 0, rst_n = 0, shift_en = 0, din = 0;
  logic [3:0] sel = '0;
  logic [3:0] row;
  logic       dout;
  int checks = 0, failures = 0;

  line_delay dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist [$];   // hist[0] = newest pixel shifted in

  function automatic bit past(int k);   // pixel shifted in k+1 strobes ago
    return (k < hist.size()) ? hist[k] : 1'b0;
  endfunction

  initial begin
    int w;
    bit b;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int wi = 0; wi < 16; wi++) begin
      sel = 4'(wi);
      w = 25 + wi;
      for (int i = 0; i < 120; i++) begin
        @(negedge clk);
        shift_en = ($urandom_range(0, 3) != 0);
        b = 1'($urandom);
        din = b;
        @(posedge clk); #1;
        if (shift_en) hist.push_front(b);
        checks++;
        if (row !== {past(3), past(2), past(1), past(0)} || dout !== past(w - 1)) begin
          failures++;
          if (failures < 10)
            $display("width %0d step %0d: row %b dout %b, expected %b%b%b%b %b", w, i, row, dout,
                     past(3), past(2), past(1), past(0), past(w - 1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
