// tmul_pkg_tb: checks the elaboration-time functions of tmul_pkg.
//
// * Truncation parameters: for a 7x7 multiplier faithful on 7 bits the
//   truncation column is l_ext = 4 (3 guard bits) with t = 3 further bits
//   dropped in that column; delta_low matches the closed form
//   (n-1)*2^n + 1 on the triangular part of the board.
// * Tiling error: the closed-form rectangle weights agree with a position by
//   position sum of the uncovered board.
// * Default tilings over a range of sizes, with and without the DSP tile:
//   no overlaps, faithful error bounds, C on bits l_ext .. lP-2, tile extents
//   matching their shape.
// * Table costs of the tile shapes.
module tmul_pkg_tb;
  import tmul_pkg::*;

  int checks = 0, failures = 0;
  localparam int WP_LIST [9] = '{1, 7, 16, 31, 32, 33, 48, 63, 64};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [127:0] brute_error(input int wx, input int wy, input tiling_t tg);
    logic [127:0] e;
    bit cov;
    e = '0;
    for (int y = 0; y < wy; y++)
      for (int x = 0; x < wx; x++) begin
        cov = 0;
        for (int i = 0; i < int'(tg.n); i++)
          if (x >= int'(tg.tiles[i].x) && x < int'(tg.tiles[i].x) + int'(tg.tiles[i].wa) &&
              y >= int'(tg.tiles[i].y) && y < int'(tg.tiles[i].y) + int'(tg.tiles[i].wb))
            cov = 1;
        if (!cov) e += 128'd1 << (x + y);
      end
    return e;
  endfunction

  function automatic bit shape_ok(input tile_t t);
    int a, b;
    a = int'(t.wa);
    b = int'(t.wb);
    case (t.shape)
      SH_1X1:  return a == 1 && b == 1;
      SH_1X2:  return a * b == 2;
      SH_2X3:  return a * b == 6 && (a == 2 || a == 3);
      SH_3X3:  return a == 3 && b == 3;
      SH_2XK:  return (a == 2 && b >= 4) || (b == 2 && a >= 4);
      SH_DSP:  return (a == DSP_WA && b == DSP_WB) || (a == DSP_WB && b == DSP_WA);
      default: return 0;
    endcase
  endfunction

  task automatic check_config(input int wx, input int wy, input int wp, input int nd);
    tiling_t tg;
    int lp;
    bit ext_ok;
    logic [127:0] c;
    lp = wx + wy - wp;
    tg = build_tiling(wx, wy, wp, nd);
    check(tiling_overlaps(wx, wy, tg) == 0, $sformatf("%0dx%0d/%0d d%0d overlap", wx, wy, wp, nd));
    check(tiling_faithful(wx, wy, wp, tg), $sformatf("%0dx%0d/%0d d%0d faithful", wx, wy, wp, nd));
    check(tiling_error(wx, wy, tg) == brute_error(wx, wy, tg),
          $sformatf("%0dx%0d/%0d d%0d error sum", wx, wy, wp, nd));
    c = tg.c_const;
    check(((c >> tg.l_ext) << tg.l_ext) == c && (lp < 1 || c < (128'd1 << (lp - 1))),
          $sformatf("%0dx%0d/%0d d%0d constant range", wx, wy, wp, nd));
    ext_ok = 1;
    for (int i = 0; i < int'(tg.n); i++) if (!shape_ok(tg.tiles[i])) ext_ok = 0;
    check(ext_ok, $sformatf("%0dx%0d/%0d d%0d shapes", wx, wy, wp, nd));
    check((nd == 0) == (tg.tiles[0].shape != SH_DSP), $sformatf("%0dx%0d/%0d d%0d dsp", wx, wy, wp, nd));
  endtask

  initial begin
    tiling_t tg;
    // Truncation parameters of the 7x7 example (g = 3, t = 3).
    check(trunc_lext(7, 7, 7) == 4, "7x7 l_ext");
    check(trunc_t(7, 7, 7) == 3, "7x7 t");
    // 7x7: delta_low(4) = 1 + 2*2 + 3*4 + 4*8 = 49.
    check(delta_low(7, 7, 4) == 49, "delta_low 7x7");
    for (int n = 0; n <= 16; n++)
      check(delta_low(16, 16, n) == ((n == 0) ? 0 : (128'(n - 1) << n) + 1),
            $sformatf("delta_low closed form n=%0d", n));
    check(col_height(7, 5, 6) == 5 && col_height(7, 5, 10) == 1 && col_height(7, 5, 11) == 0,
          "column heights 7x5");
    // No truncation when every output bit is kept.
    check(trunc_lext(8, 8, 0) == 0 && trunc_t(8, 8, 0) == 0, "exact product");
    // Costs (hundredths of a LUT).
    check(tile_cost_x100('{shape: SH_2XK, x: 0, y: 0, wa: 10, wb: 2}) == 1880, "2xk cost");
    check(tile_cost_x100('{shape: SH_DSP, x: 0, y: 0, wa: 24, wb: 17}) == 2665, "dsp cost");
    check(tile_cost_x100('{shape: SH_3X3, x: 0, y: 0, wa: 3, wb: 3}) == 990, "3x3 cost");
    check(pick_const(128'd5, 128'd48, 4) == 128'd32, "fewest-ones constant");

    for (int w = 2; w <= 32; w += 3) begin
      check_config(w, w, w, 0);
      check_config(w, w, w, 1);
    end
    foreach (WP_LIST[k]) begin
      check_config(32, 32, WP_LIST[k], 0);
      check_config(32, 32, WP_LIST[k], 1);
    end
    check_config(13, 9, 10, 0);
    check_config(30, 20, 25, 1);

    tg = build_tiling(26, 26, 26, 1);
    $display("26x26/26 with DSP: %0d tiles, border %0d, l_ext %0d, t %0d, C=%0h, cost %0d/100",
             tg.n, tg.border, tg.l_ext, tg.t, tg.c_const, tiling_cost_x100(tg));
    for (int i = 0; i < int'(tg.n); i++)
      $display("  tile %0d shape %0d at (%0d,%0d) %0dx%0d", i, tg.tiles[i].shape,
               tg.tiles[i].x, tg.tiles[i].y, tg.tiles[i].wa, tg.tiles[i].wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: the checks above take no simulated time.
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
