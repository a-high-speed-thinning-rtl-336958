// tb_thinning_logic: exhaustive check of the template decoder.
//
// Every one of the 2^16 possible 4x4 windows is applied. The expected
// result comes from a reference written differently from the RTL: each
// template is a 9-character string over {0,1,x} read row by row over the
// 3x3 neighbourhood, extra conditions on numbered pixels are computed as
// integer sums, and the 1x4 / 4x1 windows as 4-character strings. The
// testbench checks pix_out and the thin/save/trim/remove flags, and that
// every template fires at least once.
module tb_thinning_logic;
  import thin_pkg::*;

  win_t win;
  logic pix_out;
  hit_t hit;
  int   checks = 0, failures = 0;

  thinning_logic dut (.win(win), .pix_out(pix_out), .hit(hit));

  int px [4][4];

  function automatic bit match3(string t);
    for (int i = 0; i < 9; i++) begin
      if (t[i] == "0" && px[i/3][i%3] != 0) return 0;
      if (t[i] == "1" && px[i/3][i%3] != 1) return 0;
    end
    return 1;
  endfunction

  string thin_tpl [8] = '{"000111x1x", "01x01101x", "x1x111000", "x10110x10",
                          "x00110x1x", "00x011x1x", "x1x01100x", "x1x110x00"};
  string diag_tpl [4] = '{"000010100", "000010001", "001010000", "100010000"};

  int fired_thin [8];
  int fired_trim [10];
  int fired_save;

  initial begin
    // watchdog: the sweep takes 2^16 steps of 1 ns
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_thin, exp_save, exp_trim, exp_remove, exp_pix;
    bit tr [10];
    int p3, p5, p7, p9, p10, p11, p12, p13, p14, p15;
    for (int v = 0; v < 65536; v++) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) begin
          px[r][c] = (v >> (r*4 + c)) & 1;
          win[r][c]  = px[r][c][0];
        end
      #1;
      p7 = px[0][0]; p9 = px[0][2]; p5 = px[2][0]; p3 = px[2][2];
      p10 = px[3][0]; p11 = px[3][1]; p12 = px[3][2];
      p13 = px[0][3]; p14 = px[1][3]; p15 = px[2][3];
      exp_thin = 0;
      for (int k = 0; k < 8; k++)
        if (match3(thin_tpl[k])) begin exp_thin = 1; fired_thin[k]++; end
      exp_save = (px[1][0] == 0 && px[1][1] == 1 && px[1][2] == 1 && px[1][3] == 0) ||
                 (px[0][1] == 0 && px[1][1] == 1 && px[2][1] == 1 && px[3][1] == 0);
      tr[0] = match3("000010x1x") && (p3 + p5 == 1);
      tr[1] = match3("00x01100x") && (p9 + p3 == 1);
      tr[2] = match3("x1x010000") && (p7 + p9 >= 1);
      tr[3] = match3("x00110x00") && (p5 + p7 >= 1);
      tr[4] = match3("000010111") && (p10 + p11 + p12 > 0);
      tr[5] = match3("001011001") && (p13 + p14 + p15 > 0);
      for (int k = 0; k < 4; k++) tr[6+k] = match3(diag_tpl[k]);
      exp_trim = 0;
      for (int k = 0; k < 10; k++) if (tr[k]) begin exp_trim = 1; fired_trim[k]++; end
      if (px[1][1] == 1 && exp_thin && exp_save) fired_save++;
      exp_remove = (exp_thin && !exp_save) || exp_trim;
      exp_pix    = (px[1][1] == 1) && !exp_remove;
      if (px[1][1] == 0) begin exp_thin = 0; exp_save = 0; exp_trim = 0; exp_remove = 0; end

      checks++;
      if (pix_out !== exp_pix || hit.thin !== exp_thin || hit.save !== exp_save ||
          hit.trim !== exp_trim || hit.remove !== exp_remove) begin
        failures++;
        if (failures < 10)
          $display("mismatch window %04h: pix %b/%b thin %b/%b save %b/%b trim %b/%b",
                   v, pix_out, exp_pix, hit.thin, exp_thin, hit.save, exp_save,
                   hit.trim, exp_trim);
      end
    end
    // every template must have been exercised
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (fired_thin[k] == 0) begin failures++; $display("thinning template %0d never fired", k); end
    end
    for (int k = 0; k < 10; k++) begin
      checks++;
      if (fired_trim[k] == 0) begin failures++; $display("trimming template %0d never fired", k); end
    end
    checks++;
    if (fired_save == 0) begin failures++; $display("saving window never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
