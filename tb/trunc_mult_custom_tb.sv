// trunc_mult_custom_tb: the multiplier with a hand-written tiling passed
// through the TILING parameter instead of the default tiler.
//
// Board 20 x 28, 20-bit output (lP = 28). The tiling uses every tile shape
// and orientation the block supports: the DSP tile rotated (17 along x, 24
// along y), a vertical 2xk tile, a 3x3, a 2x3 placed 2 wide and 3 tall,
// vertical and horizontal 1x2 tiles and a 1x1. Positions of low weight are
// left uncovered and C is the largest constant allowed; the block's
// elaboration check confirms the tiling is faithful. Checks as in trunc_mult_tb: bit-exact model and
// faithful bound, on random and corner operands, one time unit per vector.
module trunc_mult_custom_tb;
  import tmul_pkg::*;
  import tmul_tb_pkg::*;

  localparam int WX = 20, WY = 28, WP = 20;
  localparam int LP = WX + WY - WP;

  function automatic tiling_t hand_tiling();
    tiling_t tg;
    tg = '0;
    tg = add_tile(tg, SH_DSP, 3, 4, DSP_WB, DSP_WA);   // rotated, x 3..19, y 4..27
    tg = add_tile(tg, SH_3X3, 17, 0, 3, 3);
    tg = add_tile(tg, SH_2X3, 15, 0, 2, 3);
    tg = add_tile(tg, SH_1X2, 14, 0, 1, 2);
    tg = add_tile(tg, SH_1X1, 14, 2, 1, 1);
    for (int x = 12; x < 20; x += 2) tg = add_tile(tg, SH_1X2, x, 3, 2, 1);
    tg = add_tile(tg, SH_2XK, 0, 10, 2, 18);            // columns 0..1, y 10..27
    for (int y = 8; y < 28; y += 2) tg = add_tile(tg, SH_1X2, 2, y, 1, 2);
    tg.l_ext = 8'(trunc_lext(WX, WY, LP));
    // Largest allowed C (bits l_ext .. lP-2 all set), to exercise the
    // constant path; the error left out is far below the budget.
    tg.c_const = (128'd1 << (LP - 1)) - (128'd1 << tg.l_ext);
    return tg;
  endfunction

  localparam tiling_t TG = hand_tiling();

  logic [WX-1:0] X;
  logic [WY-1:0] Y;
  logic [WP-1:0] P;

  trunc_mult #(.WX(WX), .WY(WY), .WP(WP), .TILING(TG)) dut (.X(X), .Y(Y), .P(P));

  int checks = 0, failures = 0, n_omit = 0;

  initial begin
    rowmask_t m;
    logic [63:0] e;
    m = coverage(WX, WY, TG);
    checks += 3;
    if (tiling_overlaps(WX, WY, TG) != 0) begin failures++; $display("FAIL: overlap"); end
    if (!tiling_faithful(WX, WY, WP, TG)) begin failures++; $display("FAIL: not faithful"); end
    if (TG.c_const == 0) begin failures++; $display("FAIL: constant unused"); end
    for (int i = 0; i < 5000; i++) begin
      X = WX'($urandom);
      Y = WY'($urandom);
      if (i == 0) begin X = '1; Y = '1; end
      if (i == 1) begin X = '0; Y = '0; end
      if (i % 5 == 2) Y = '1;
      #1;
      e = expected(WX, WY, WP, TG, m, 64'(X), 64'(Y));
      checks += 2;
      if (64'(P) != e) begin
        failures++;
        if (failures < 10) $display("FAIL: X=%h Y=%h P=%h expected %h", X, Y, P, e);
      end
      if (!faithful(WX, WY, WP, 64'(P), 64'(X), 64'(Y))) begin
        failures++;
        if (failures < 10) $display("FAIL faithful: X=%h Y=%h P=%h", X, Y, P);
      end
      if (omitted(WY, m, 64'(X), 64'(Y)) != 0) n_omit++;
    end
    checks++;
    if (n_omit == 0) begin failures++; $display("FAIL: no omitted partial product"); end
    $display("tiles=%0d C=%0h omitted=%0d", TG.n, TG.c_const, n_omit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
