// thinning_logic: template decoder of the thinning processor.
//
// Purely combinational. From the 4x4 window it decides whether the centre
// pixel w[1][1] survives one thinning pass. All templates are evaluated in
// parallel on the unmodified input window, so one pass is one parallel
// iteration of the algorithm.
//
// Neighbour names used below (row, col of win_t; Pn as printed for the
// templates that use numbered pixels):
//     nw=P7 (0,0)  n (0,1)  ne=P9 (0,2)  P13 (0,3)
//     w     (1,0)  C (1,1)  e     (1,2)  e2=P14 (1,3)
//     sw=P5 (2,0)  s (2,1)  se=P3 (2,2)  P15 (2,3)
//     P10   (3,0)  s2=P11 (3,1)  P12 (3,2)
//
// Removal rules (following the original algorithm):
//  * Thinning, eight 3x3 templates: four boundary templates (a-d) and four
//    corner templates (e-h). The centre is removed when any matches ...
//  * ... unless one of the two saving windows matches: the 1x4 window
//    "0 C=1 1 0" along the centre row, or the 4x1 window "0 C=1 1 0" down
//    the centre column. They keep two-pixel-thick strokes from vanishing.
//  * Trimming (noise removal), ten templates: six modified end-point
//    templates (a-d with a condition on corner pixels, e-f reaching into
//    row 3 / column 3) and four templates for a pixel whose only neighbour
//    is one diagonal. A trimming match removes the centre regardless of the
//    saving windows; that precedence is a choice of this design.
// In trimming templates (a) and (b) the two corner pixels must sum to
// exactly one (XOR); in (c) and (d) to at least one (OR), as the two
// conditions are printed differently for the two pairs.
//
// Outputs: pix_out = centre pixel after the pass; hit = which families
// matched (for observation; hit.remove = the centre was cleared).
module thinning_logic (
  input  thin_pkg::win_t win,
  output logic           pix_out,
  output thin_pkg::hit_t hit
);

  logic nw, n, ne, w, c, e, sw, s, se;
  logic e2, s2, p10, p12, p13, p15;

  assign {nw, n, ne} = {win[0][0], win[0][1], win[0][2]};
  assign {w,  c, e } = {win[1][0], win[1][1], win[1][2]};
  assign {sw, s, se} = {win[2][0], win[2][1], win[2][2]};
  assign e2  = win[1][3];
  assign s2  = win[3][1];
  assign p10 = win[3][0];
  assign p12 = win[3][2];
  assign p13 = win[0][3];
  assign p15 = win[2][3];

  // ---- thinning templates --------------------------------------------------
  logic [7:0] thin_t;
  always_comb begin
    // boundary pixels
    thin_t[0] = !nw && !n && !ne &&  w &&  e &&  s;               // 000 / 111 / x1x
    thin_t[1] = !nw &&  n && !w  &&  e && !sw &&  s;              // 01x / 011 / 01x
    thin_t[2] =  n  &&  w &&  e  && !sw && !s && !se;             // x1x / 111 / 000
    thin_t[3] =  n  && !ne &&  w && !e  &&  s && !se;             // x10 / 110 / x10
    // corner pixels
    thin_t[4] = !n  && !ne &&  w && !e  &&  s;                    // x00 / 110 / x1x
    thin_t[5] = !nw && !n  && !w &&  e  &&  s;                    // 00x / 011 / x1x
    thin_t[6] =  n  && !w  &&  e && !sw && !s;                    // x1x / 011 / 00x
    thin_t[7] =  n  &&  w  && !e && !s  && !se;                   // x1x / 110 / x00
  end

  // ---- saving windows (1x4 and 4x1) ----------------------------------------
  logic save_h, save_v;
  assign save_h = !w && e && !e2;                                 // 0 C 1 0 along the row
  assign save_v = !n && s && !s2;                                 // 0 C 1 0 down the column

  // ---- trimming templates --------------------------------------------------
  logic [9:0] trim_t;
  always_comb begin
    // modified end-point templates
    trim_t[0] = !nw && !n && !ne && !w && !e && s && (sw ^ se);                  // 000/010/P5 1 P3
    trim_t[1] = !nw && !n && !w && e && !sw && !s && (ne ^ se);                  // 00P9/011/00P3
    trim_t[2] =  n && !w && !e && !sw && !s && !se && (nw || ne);                // P7 1 P9/010/000
    trim_t[3] = !n && !ne && w && !e && !s && !se && (nw || sw);                 // P7 00/110/P5 00
    trim_t[4] = !nw && !n && !ne && !w && !e && sw && s && se && (p10 || s2 || p12);
    trim_t[5] = !nw && !n && ne && !w && e && !sw && !s && se && (p13 || e2 || p15);
    // a single diagonal neighbour
    trim_t[6] = !nw && !n && !ne && !w && !e &&  sw && !s && !se;                // only SW
    trim_t[7] = !nw && !n && !ne && !w && !e && !sw && !s &&  se;                // only SE
    trim_t[8] = !nw && !n &&  ne && !w && !e && !sw && !s && !se;                // only NE
    trim_t[9] =  nw && !n && !ne && !w && !e && !sw && !s && !se;                // only NW
  end

  always_comb begin
    hit.thin   = c && (|thin_t);
    hit.save   = c && (save_h || save_v);
    hit.trim   = c && (|trim_t);
    hit.remove = (hit.thin && !hit.save) || hit.trim;
    pix_out    = c && !hit.remove;
  end

endmodule
