// tmul_pkg: types, costs and elaboration-time functions shared by the
// faithfully rounded truncated multiplier.
//
// A multiplier is described as a board of partial-product positions (x, y),
// x indexing the bits of X and y the bits of Y; position (x, y) has weight
// 2^(x+y). A tiling places rectangular sub-multiplier tiles on that board.
// Positions left uncovered are simply not computed; the error they cause is
// bounded and compensated by a constant C so that the final WP-bit product is
// faithfully rounded (|P - X*Y| < 2^lP, lP = WX + WY - WP).
//
// Contents:
//  * shape_e / tile_t / tiling_t  - tile shapes of the FPGA tile library
//    (1x1, 1x2, 2x3, 3x3 LUT tiles, 2xk carry-chain tile, 24x17 DSP tile),
//    one placed tile, and a complete tiling with its constant C.
//  * tile_cost_x100 - LUT cost of each tile in hundredths of a LUT, with the
//    compressor cost of 0.65 LUT per bit folded in (the FPGA cost table).
//  * col_height / delta_low / trunc_lext / trunc_t - the greedy computation of
//    the truncation column l_ext and the number t of bits that may also be
//    dropped in that column (two loops, each advancing while
//    (t+1)*2^l_ext + delta_low(l_ext) < 2^lP holds). delta_low is summed from
//    the real column heights so it also holds for WX != WY.
//  * build_tiling - the default tiling. The cost-optimal placement comes from
//    an integer linear program solved at design time; that solver is not
//    hardware, so this package uses a simple deterministic tiler in its place
//    (this design's own choice): an optional DSP tile in the most significant
//    corner, the rest cut into 2- and 3-row (or column) bands covered by 2xk,
//    2x3, 3x3, 1x2 and 1x1 tiles, each band starting at a diagonal border L.
//    L is raised as far as the error budget allows, so tiles that reach past
//    the border (the DSP in particular) pay for positions left out elsewhere:
//    the error of the tiling, not a fixed border, decides what is omitted.
//    The constant C is then the multiple of 2^l_ext with fewest one bits that
//    meets both error constraints.
//  * tiling_error / tiling_faithful / tiling_overlaps - checks on any tiling,
//    used by the multiplier at elaboration and by the testbenches.
//
// Limits: board sides up to 64 bits, at most MAX_TILES tiles.
package tmul_pkg;

  localparam int MAX_TILES = 96;
  localparam int DSP_WA    = 24;   // DSP tile extent along x (bits of X)
  localparam int DSP_WB    = 17;   // DSP tile extent along y (bits of Y)
  localparam int COMP_COST_X100 = 65;  // compressor cost, LUT/bit x 100

  typedef enum logic [2:0] {
    SH_NONE = 3'd0,
    SH_1X1  = 3'd1,
    SH_1X2  = 3'd2,
    SH_2X3  = 3'd3,
    SH_3X3  = 3'd4,
    SH_2XK  = 3'd5,
    SH_DSP  = 3'd6
  } shape_e;

  // One placed tile: covers x in [x, x+wa) and y in [y, y+wb). Parts outside
  // the board multiply zero bits and cover nothing.
  typedef struct packed {
    shape_e     shape;
    logic [6:0] x;
    logic [6:0] y;
    logic [6:0] wa;
    logic [6:0] wb;
  } tile_t;

  typedef struct packed {
    tile_t [MAX_TILES-1:0] tiles;
    logic [7:0]            n;       // number of valid tiles, tiles[0..n-1]
    logic [127:0]          c_const; // correction constant C
    logic [7:0]            l_ext;   // lowest column allowed for C bits
    logic [7:0]            t;       // bits droppable in column l_ext
    logic [7:0]            border;  // diagonal L the tiler settled on
  } tiling_t;

  function automatic logic [127:0] pow2(input int n);
    return (n < 0) ? 128'd0 : (128'd1 << n);
  endfunction

  function automatic int imax(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  function automatic int imin(input int a, input int b);
    return (a < b) ? a : b;
  endfunction

  // LUT cost in hundredths of a LUT.
  function automatic int tile_cost_x100(input tile_t tl);
    case (tl.shape)
      SH_1X1:  return 165;
      SH_1X2:  return 230;
      SH_2X3:  return 625;
      SH_3X3:  return 990;
      SH_2XK:  return 165 * imax(int'(tl.wa), int'(tl.wb)) + 230;
      SH_DSP:  return 2665;
      default: return 0;
    endcase
  endfunction

  // Number of partial products in column c of a wx x wy board.
  function automatic int col_height(input int wx, input int wy, input int c);
    int lo, hi;
    lo = imax(0, c - (wy - 1));
    hi = imin(c, wx - 1);
    return (hi >= lo) ? (hi - lo + 1) : 0;
  endfunction

  // Largest error when every bit in columns below l is dropped.
  function automatic logic [127:0] delta_low(input int wx, input int wy, input int l);
    logic [127:0] s;
    s = '0;
    for (int c = 0; c < l; c++)
      s += 128'(col_height(wx, wy, c)) << c;
    return s;
  endfunction

  // First loop: the truncation column l_ext for a product faithful to 2^lp.
  function automatic int trunc_lext(input int wx, input int wy, input int lp);
    int le;
    le = 0;
    while ((pow2(le + 1) + delta_low(wx, wy, le + 1)) < pow2(lp))
      le++;
    return le;
  endfunction

  // Second loop: the number of bits t that may also be dropped in column l_ext.
  function automatic int trunc_t(input int wx, input int wy, input int lp);
    int le, t;
    le = trunc_lext(wx, wy, lp);
    t  = 0;
    while ((128'(t + 2) * pow2(le) + delta_low(wx, wy, le)) < pow2(lp))
      t++;
    return t;
  endfunction

  // Sum of 2^(x+y) over the part of a tile that lies on the board.
  function automatic logic [127:0] tile_weight(input int wx, input int wy, input tile_t tl);
    int x0, x1, y0, y1;
    x0 = int'(tl.x);
    y0 = int'(tl.y);
    x1 = imin(wx, x0 + int'(tl.wa));
    y1 = imin(wy, y0 + int'(tl.wb));
    if (x1 <= x0 || y1 <= y0) return '0;
    return (pow2(x1) - pow2(x0)) * (pow2(y1) - pow2(y0));
  endfunction

  // Largest tiling error: the summed weight of all uncovered positions
  // (valid for tilings without overlap, see tiling_overlaps).
  function automatic logic [127:0] tiling_error(input int wx, input int wy, input tiling_t tg);
    logic [127:0] covered;
    covered = '0;
    for (int i = 0; i < int'(tg.n); i++)
      covered += tile_weight(wx, wy, tg.tiles[i]);
    return (pow2(wx) - 1) * (pow2(wy) - 1) - covered;
  endfunction

  // Counts board positions covered by more than one tile.
  function automatic int tiling_overlaps(input int wx, input int wy, input tiling_t tg);
    int cnt, hits;
    cnt = 0;
    for (int y = 0; y < wy; y++)
      for (int x = 0; x < wx; x++) begin
        hits = 0;
        for (int i = 0; i < int'(tg.n); i++)
          if (x >= int'(tg.tiles[i].x) && x < int'(tg.tiles[i].x) + int'(tg.tiles[i].wa) &&
              y >= int'(tg.tiles[i].y) && y < int'(tg.tiles[i].y) + int'(tg.tiles[i].wb))
            hits++;
        if (hits > 1) cnt++;
      end
    return cnt;
  endfunction

  // Both error constraints: C < 2^(lp-1) and err - C < 2^(lp-1); with lp = 0
  // the product is exact and nothing may be left out.
  function automatic bit tiling_faithful(input int wx, input int wy, input int wp,
                                         input tiling_t tg);
    logic [127:0] err, half;
    int lp;
    lp  = wx + wy - wp;
    err = tiling_error(wx, wy, tg);
    if (lp == 0) return (err == 0) && (tg.c_const == 0);
    half = pow2(lp - 1);
    if (tg.c_const >= half) return 1'b0;
    if (err > tg.c_const && (err - tg.c_const) >= half) return 1'b0;
    return 1'b1;
  endfunction

  // Constant with the fewest one bits: multiple of 2^le in [cmin, cmax].
  // Returns cmax + 1 when no such value exists.
  function automatic logic [127:0] pick_const(input logic [127:0] cmin,
                                              input logic [127:0] cmax, input int le);
    logic [127:0] c, step, low;
    step = pow2(le);
    c = ((cmin + step - 1) >> le) << le;
    if (c > cmax) return cmax + 1;
    // Adding the lowest set bit never adds one bits; stop before leaving range.
    while (c != 0) begin
      low = c & (~c + 1);
      if (c + low > cmax) break;
      c = c + low;
    end
    return c;
  endfunction

  // Appends one tile.
  function automatic tiling_t add_tile(input tiling_t tg_in, input shape_e sh, input int x, input int y,
                                   input int wa, input int wb);
    tiling_t tg;
    tg = tg_in;
    tg.tiles[tg.n] = '{shape: sh, x: 7'(x), y: 7'(y), wa: 7'(wa), wb: 7'(wb)};
    tg.n = tg.n + 1;
    return tg;
  endfunction

  // Covers one band. For a row band (is_col = 0) the band holds rows
  // [b0, b0+h) and spans x in [s0, s1); for a column band the roles of x and
  // y are swapped. Tile extents are given along (span, across).
  function automatic tiling_t tile_band(input tiling_t tg_in, input bit is_col, input int b0,
                                    input int h, input int s0, input int s1);
    tiling_t tg;
    int len, s;
    tg = tg_in;
    len = s1 - s0;
    if (len <= 0) return tg;
    s = s0;
    if (h == 2) begin
      if (len >= 4) begin
        if (is_col) tg = add_tile(tg, SH_2XK, b0, s, 2, len);
        else        tg = add_tile(tg, SH_2XK, s, b0, len, 2);
      end else if (len == 3) begin
        if (is_col) tg = add_tile(tg, SH_2X3, b0, s, 2, 3);
        else        tg = add_tile(tg, SH_2X3, s, b0, 3, 2);
      end else begin
        for (int k = 0; k < len; k++) begin
          if (is_col) tg = add_tile(tg, SH_1X2, b0, s + k, 2, 1);
          else        tg = add_tile(tg, SH_1X2, s + k, b0, 1, 2);
        end
      end
    end else if (h == 3) begin
      // Remainder first, at the low-weight end next to the border.
      if (len % 3 == 2) begin
        if (is_col) tg = add_tile(tg, SH_2X3, b0, s, 3, 2);
        else        tg = add_tile(tg, SH_2X3, s, b0, 2, 3);
        s += 2;
      end else if (len % 3 == 1) begin
        if (is_col) begin
          tg = add_tile(tg, SH_1X2, b0, s, 2, 1);
          tg = add_tile(tg, SH_1X1, b0 + 2, s, 1, 1);
        end else begin
          tg = add_tile(tg, SH_1X2, s, b0, 1, 2);
          tg = add_tile(tg, SH_1X1, s, b0 + 2, 1, 1);
        end
        s += 1;
      end
      while (s < s1) begin
        tg = add_tile(tg, SH_3X3, is_col ? b0 : s, is_col ? s : b0, 3, 3);
        s += 3;
      end
    end else begin
      while (s + 1 < s1) begin
        if (is_col) tg = add_tile(tg, SH_1X2, b0, s, 1, 2);
        else        tg = add_tile(tg, SH_1X2, s, b0, 2, 1);
        s += 2;
      end
      if (s < s1) tg = add_tile(tg, SH_1X1, is_col ? b0 : s, is_col ? s : b0, 1, 1);
    end
    return tg;
  endfunction

  // Cuts [0, n) into bands of 2, the lowest one of 3 when n is odd (1 if n = 1),
  // and covers each from the diagonal border L on.
  function automatic tiling_t tile_region(input tiling_t tg_in, input bit is_col, input int n,
                                      input int span_lo, input int span_hi, input int border);
    tiling_t tg;
    int b, h;
    tg = tg_in;
    b = 0;
    while (b < n) begin
      h = (b == 0 && (n % 2) == 1) ? imin(3, n) : 2;
      // Cover every position of weight >= L in the band.
      tg = tile_band(tg, is_col, b, h, imax(span_lo, border - (b + h - 1)), span_hi);
      b += h;
    end
    return tg;
  endfunction

  function automatic tiling_t place_tiles(input int wx, input int wy, input int ndsp,
                                          input int border);
    tiling_t tg;
    int dx, dy;
    tg = '0;
    if (ndsp > 0) begin
      dx = imax(0, wx - DSP_WA);
      dy = imax(0, wy - DSP_WB);
      tg = add_tile(tg, SH_DSP, dx, dy, DSP_WA, DSP_WB);
      tg = tile_region(tg, 1'b0, dy, 0, wx, border);   // rows below the DSP
      tg = tile_region(tg, 1'b1, dx, dy, wy, border);  // columns beside it
    end else begin
      tg = tile_region(tg, 1'b0, wy, 0, wx, border);
    end
    return tg;
  endfunction

  // Default tiling for a wx x wy multiplier faithful on wp bits, with ndsp
  // (0 or 1) DSP tiles.
  function automatic tiling_t build_tiling(input int wx, input int wy, input int wp,
                                           input int ndsp);
    tiling_t tg;
    logic [127:0] err, half, cmin, cmax, c;
    int lp, le;
    lp = wx + wy - wp;
    le = trunc_lext(wx, wy, lp);
    half = pow2(lp - 1);
    cmax = (lp >= 2 && le <= lp - 2) ? (pow2(lp - 1) - pow2(le)) : '0;
    for (int border = lp; border >= 0; border--) begin
      tg  = place_tiles(wx, wy, ndsp, border);
      err = tiling_error(wx, wy, tg);
      if (lp == 0) begin
        if (err == 0) begin
          c = '0;
        end else begin
          continue;
        end
      end else begin
        cmin = (err >= half) ? (err - half + 1) : '0;
        c = pick_const(cmin, cmax, le);
        if (c > cmax) continue;
      end
      tg.c_const = c;
      tg.l_ext   = 8'(le);
      tg.t       = 8'(trunc_t(wx, wy, lp));
      tg.border  = 8'(border);
      return tg;
    end
    return '0;  // not reached: border 0 covers the whole board
  endfunction

  // LUT cost of a tiling (objective with compressor cost of the constant bits).
  function automatic int tiling_cost_x100(input tiling_t tg);
    int s;
    s = 0;
    for (int i = 0; i < int'(tg.n); i++) s += tile_cost_x100(tg.tiles[i]);
    for (int b = 0; b < 128; b++) if (tg.c_const[b]) s += COMP_COST_X100;
    return s;
  endfunction

endpackage
