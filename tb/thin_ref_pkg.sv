// thin_ref_pkg: software reference of one thinning pass, for testbenches.
//
// thin_image holds a binary image (at most 64x64) and computes one parallel
// pass of the algorithm on it, independently of the RTL: every template is a
// 9-character string over {0,1,x} read row by row over the 3x3
// neighbourhood, numbered-pixel conditions are integer sums, and pixels
// outside the image read as 0. The pass also counts how often each template
// family decided a pixel, so that a testbench can prove each mechanism ran.
// It also draws the synthetic test glyphs used by the end-to-end benches.
package thin_ref_pkg;

  typedef struct {
    int thin_removed;      // removed by a thinning template
    int saved;             // a thinning template matched but a 1x4/4x1 window kept it
    int trim_endpoint;     // modified end-point templates (corner-pixel conditions)
    int trim_extended;     // extended templates reaching row 3 / column 3
    int trim_diagonal;     // isolated pixel with a single diagonal neighbour
    int trim_each [10];    // per trimming template
  } stats_t;

  class thin_image;
    int h, w;
    bit px [64][64];

    function new(int h_, int w_);
      h = h_; w = w_;
      for (int r = 0; r < 64; r++) for (int c = 0; c < 64; c++) px[r][c] = 0;
    endfunction

    function bit get(int r, int c);
      if (r < 0 || c < 0 || r >= h || c >= w) return 0;
      return px[r][c];
    endfunction

    function void set(int r, int c, bit v);
      if (r >= 1 && c >= 1 && r < h - 1 && c < w - 1) px[r][c] = v;  // keep the blank border
    endfunction

    function void fill(int r0, int c0, int r1, int c1);
      for (int r = r0; r <= r1; r++) for (int c = c0; c <= c1; c++) set(r, c, 1);
    endfunction

    function int count();
      int n = 0;
      for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) n += px[r][c];
      return n;
    endfunction

    // 3x3 template match centred on (r,c); t[0..8] row by row.
    local function bit m3(int r, int c, string t);
      for (int i = 0; i < 9; i++) begin
        bit v = get(r - 1 + i / 3, c - 1 + i % 3);
        if (t[i] == "0" && v) return 0;
        if (t[i] == "1" && !v) return 0;
      end
      return 1;
    endfunction

    // Result of one pass for pixel (r,c): 1 = pixel kept. Updates st.
    function bit decide(int r, int c, ref stats_t st);
      static string thin_tpl [8] = '{"000111x1x", "01x01101x", "x1x111000", "x10110x10",
                                     "x00110x1x", "00x011x1x", "x1x01100x", "x1x110x00"};
      static string diag_tpl [4] = '{"000010100", "000010001", "001010000", "100010000"};
      bit thin = 0, save, trim = 0;
      bit tr [10];
      int p3, p5, p7, p9;
      if (!get(r, c)) return 0;
      foreach (thin_tpl[k]) if (m3(r, c, thin_tpl[k])) thin = 1;
      save = (!get(r, c - 1) && get(r, c + 1) && !get(r, c + 2)) ||
             (!get(r - 1, c) && get(r + 1, c) && !get(r + 2, c));
      p7 = get(r - 1, c - 1); p9 = get(r - 1, c + 1);
      p5 = get(r + 1, c - 1); p3 = get(r + 1, c + 1);
      tr[0] = m3(r, c, "000010x1x") && (p3 + p5 == 1);
      tr[1] = m3(r, c, "00x01100x") && (p9 + p3 == 1);
      tr[2] = m3(r, c, "x1x010000") && (p7 + p9 >= 1);
      tr[3] = m3(r, c, "x00110x00") && (p5 + p7 >= 1);
      tr[4] = m3(r, c, "000010111") &&
              (get(r + 2, c - 1) + get(r + 2, c) + get(r + 2, c + 1) > 0);
      tr[5] = m3(r, c, "001011001") &&
              (get(r - 1, c + 2) + get(r, c + 2) + get(r + 1, c + 2) > 0);
      foreach (diag_tpl[k]) tr[6 + k] = m3(r, c, diag_tpl[k]);
      foreach (tr[k]) if (tr[k]) begin trim = 1; st.trim_each[k]++; end
      if (tr[0] || tr[1] || tr[2] || tr[3]) st.trim_endpoint++;
      else if (tr[4] || tr[5])              st.trim_extended++;
      else if (trim)                        st.trim_diagonal++;
      if (thin && save && !trim) st.saved++;
      if (thin && !save && !trim) st.thin_removed++;
      return !((thin && !save) || trim);
    endfunction

    function thin_image pass(ref stats_t st);
      thin_image o = new(h, w);
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++) o.px[r][c] = decide(r, c, st);
      return o;
    endfunction

    // Number of 8-connected groups of set pixels.
    function int components();
      int lab [64][64];
      int n = 0;
      int qr [$], qc [$];
      for (int r = 0; r < 64; r++) for (int c = 0; c < 64; c++) lab[r][c] = 0;
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++)
          if (px[r][c] && lab[r][c] == 0) begin
            n++;
            lab[r][c] = n; qr.push_back(r); qc.push_back(c);
            while (qr.size() > 0) begin
              int pr = qr.pop_front(), pc = qc.pop_front();
              for (int dr = -1; dr <= 1; dr++)
                for (int dc = -1; dc <= 1; dc++)
                  if (get(pr + dr, pc + dc) && lab[pr + dr][pc + dc] == 0) begin
                    lab[pr + dr][pc + dc] = n; qr.push_back(pr + dr); qc.push_back(pc + dc);
                  end
            end
          end
      return n;
    endfunction

    function void show(string title);
      $display("%s (%0dx%0d, %0d pixels)", title, w, h, count());
      for (int r = 0; r < h; r++) begin
        string s = "";
        for (int c = 0; c < w; c++) s = {s, px[r][c] ? "@" : "."};
        $display("  %s", s);
      end
    endfunction
  endclass

  // ---- synthetic glyphs (drawn strokes, not scans) -------------------------

  // L-shaped stroke with a thick hooked top and a two-line base with a bump.
  function automatic thin_image glyph_l(int h, int w);
    thin_image im = new(h, w);
    im.fill(1, 1, 1, 6);  im.fill(2, 2, 2, 7);
    im.fill(3, 4, h - 4, 7);
    im.fill(h - 3, 4, h - 2, w - 4);
    im.fill(h - 4, w - 8, h - 4, w - 7);
    return im;
  endfunction

  // 'T': thick bar and stem.
  function automatic thin_image glyph_t(int h, int w);
    thin_image im = new(h, w);
    im.fill(2, 2, 6, w - 3);
    im.fill(7, w / 2 - 3, h - 3, w / 2 + 2);
    return im;
  endfunction

  // 'e': thick ring with a middle bar and an opening at the lower right.
  function automatic thin_image glyph_e(int h, int w);
    thin_image im = new(h, w);
    int cr = h / 2, cc = w / 2;
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int d2 = (r - cr) * (r - cr) * (w * w) / (h * h) + (c - cc) * (c - cc);
        int ro = (w / 2 - 2) * (w / 2 - 2), ri = (w / 2 - 7) * (w / 2 - 7);
        if (d2 <= ro && d2 >= ri && !(r > cr + 1 && r < cr + h / 4 && c > cc)) im.set(r, c, 1);
      end
    im.fill(cr - 2, 4, cr + 1, w - 5);
    return im;
  endfunction

  // 'g': ring on top of a hook.
  function automatic thin_image glyph_g(int h, int w);
    thin_image im = new(h, w);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++) begin
        int d2 = (r - 8) * (r - 8) + (c - w / 2) * (c - w / 2);
        if (d2 <= 49 && d2 >= 12) im.set(r, c, 1);
      end
    im.fill(2, w / 2 + 5, h - 6, w / 2 + 7);
    im.fill(h - 5, 4, h - 3, w / 2 + 6);
    return im;
  endfunction

  // Roof, three bars, a stem and two slanted strokes (a '金'-like layout).
  function automatic thin_image glyph_kim(int h, int w);
    thin_image im = new(h, w);
    for (int r = 2; r < h / 2; r++) begin
      int d = (r - 2) * (w / 2 - 3) / (h / 2 - 3);
      im.fill(r, w / 2 - d - 1, r, w / 2 - d + 1);
      im.fill(r, w / 2 + d - 1, r, w / 2 + d + 1);
    end
    im.fill(h / 2 - 3, w / 4, h / 2 - 2, 3 * w / 4);
    im.fill(h / 2 + 3, 3, h / 2 + 5, w - 4);
    im.fill(h - 5, 2, h - 3, w - 3);
    im.fill(h / 2 - 1, w / 2 - 1, h - 6, w / 2 + 1);
    for (int r = h / 2 + 7; r < h - 6; r++) begin
      im.fill(r, 6 + (r - h / 2 - 7) / 2, r, 8 + (r - h / 2 - 7) / 2);
      im.fill(r, w - 9 - (r - h / 2 - 7) / 2, r, w - 7 - (r - h / 2 - 7) / 2);
    end
    return im;
  endfunction

  // Small isolated patterns, one per trimming template (end-point a-d,
  // extended e-f, the four single-diagonal cases).
  function automatic thin_image glyph_gallery(int h, int w);
    thin_image im = new(h, w);
    im.set(2, 3, 1);  im.fill(3, 2, 3, 4);  im.set(4, 3, 1);     // extended, below
    im.set(2, 8, 1);  im.fill(1, 9, 3, 9);  im.set(2, 10, 1);    // extended, right
    im.set(2, 14, 1); im.set(3, 13, 1);                          // diagonal pair /
    im.set(2, 18, 1); im.set(3, 19, 1);                          // diagonal pair \
    im.set(7, 3, 1);  im.set(8, 3, 1);  im.set(8, 2, 1);         // end-point with SW
    im.set(7, 8, 1);  im.set(7, 9, 1);  im.set(8, 9, 1);         // end-point with SE
    im.set(12, 3, 1); im.set(11, 3, 1); im.set(11, 2, 1);        // end-point with NW above
    im.set(12, 8, 1); im.set(12, 7, 1); im.set(11, 7, 1);        // end-point with NW left
    return im;
  endfunction

  // Random blobs with scattered noise pixels.
  function automatic thin_image glyph_noise(int h, int w, int pct);
    thin_image im = new(h, w);
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        if ($urandom_range(0, 99) < pct) im.set(r, c, 1);
    return im;
  endfunction

endpackage
