// trunc_mult: faithfully rounded truncated unsigned multiplier for FPGAs,
// built from a tiling of sub-multipliers.
//
// P returns the WP most significant bits of X*Y with |P*2^lP - X*Y| < 2^lP,
// lP = WX + WY - WP (faithful rounding). The partial-product board is covered
// by the tiles listed in TILING: each tile multiplies a slice of X by a slice
// of Y (LUT tile, 2xk carry-chain tile or 24x17 DSP tile) and its product
// enters the compressor tree shifted by x + y. Positions no tile covers are
// never computed; the resulting error lies in [-E, 0], E being their summed
// weight. The constant C (bits l_ext .. lP-2) and the round bit 2^(lP-1) are
// added in the same tree, and the top WP bits of the sum are kept:
//   C < 2^(lP-1) and E - C < 2^(lP-1)  =>  |P - X*Y| < 2^lP.
// The tiling is chosen by error, not by a fixed border: a tile that reaches
// below the border (typically the DSP tile) adds exact low-weight products,
// which lets other positions be left out. Both constraints are checked at
// elaboration, so a hand-written TILING that is not faithful is rejected.
//
// Tile products are added in full, bits below l_ext included, which keeps the
// error model exact. If the rounded sum reaches 2^(WX+WY) (possible only when
// WP is smaller than WY or WX) the output saturates to all ones, which is still
// faithful; the document does not discuss this case, so it is this design's
// choice, as are the default tiling (see tmul_pkg::build_tiling) and the
// combinational timing (insert registers around the block as needed).
//
// Parameters: WX, WY input widths, WP output width, NUM_DSP (0 or 1) DSP tiles
// used by the default tiling, TILING the tiling itself.
// Ports: X, Y inputs, P output; no clock, no latency.
module trunc_mult
  import tmul_pkg::*;
#(
  parameter int unsigned WX      = 26,
  parameter int unsigned WY      = 26,
  parameter int unsigned WP      = 26,
  parameter int unsigned NUM_DSP = 1,
  parameter tiling_t     TILING  = build_tiling(int'(WX), int'(WY), int'(WP), int'(NUM_DSP))
) (
  input  logic [WX-1:0] X,
  input  logic [WY-1:0] Y,
  output logic [WP-1:0] P
);

  localparam int F    = int'(WX + WY);     // width of the exact product
  localparam int LP   = F - int'(WP);      // weight of the output LSB
  localparam int NT   = int'(TILING.n);
  localparam int NOPS = NT + 1;            // tiles plus one constant word
  // Zero bits needed above X and Y for tiles that reach past the MSB edge.
  function automatic int overhang(input bit along_y, input int w);
    int m;
    m = 0;
    for (int i = 0; i < int'(TILING.n); i++)
      m = imax(m, along_y ? int'(TILING.tiles[i].y) + int'(TILING.tiles[i].wb) - w
                          : int'(TILING.tiles[i].x) + int'(TILING.tiles[i].wa) - w);
    return m;
  endfunction

  localparam int PADX = overhang(1'b0, int'(WX));
  localparam int PADY = overhang(1'b1, int'(WY));

  // Constant word: correction C plus the round bit at 2^(lP-1).
  localparam logic [F:0] K_WORD = (F + 1)'(TILING.c_const) |
                                  ((LP > 0) ? ((F + 1)'(1) << (LP - 1)) : '0);

  if (WP < 1 || int'(WP) > F) begin : g_bad_wp
    $error("trunc_mult: WP must lie in 1 .. WX+WY");
  end
  if (!tiling_faithful(int'(WX), int'(WY), int'(WP), TILING)) begin : g_bad_tiling
    $error("trunc_mult: TILING leaves too large an error for faithful rounding");
  end

  logic [WX+PADX-1:0] xp;
  logic [WY+PADY-1:0] yp;
  logic [F:0]         ops [NOPS];
  logic [F:0]         sum;

  assign xp = (WX + PADX)'(X);
  assign yp = (WY + PADY)'(Y);
  assign ops[NT] = K_WORD;

  for (genvar i = 0; i < NT; i++) begin : g_tile
    localparam tile_t T  = TILING.tiles[i];
    localparam int    TX = int'(T.x);
    localparam int    TY = int'(T.y);
    localparam int    WA = int'(T.wa);
    localparam int    WB = int'(T.wb);
    logic [WA-1:0]    a;
    logic [WB-1:0]    b;
    logic [WA+WB-1:0] p;

    assign a = xp[TX +: WA];
    assign b = yp[TY +: WB];

    if (T.shape == SH_DSP) begin : g_dsp
      if (WA == DSP_WA) begin : g_std
        dsp_mult_24x17 u_mul (.a(a), .b(b), .p(p));
      end else begin : g_rot
        dsp_mult_24x17 u_mul (.a(b), .b(a), .p(p));
      end
    end else if (T.shape == SH_2XK) begin : g_2xk
      if (WB == 2) begin : g_row
        mult_2xk #(.K(WA)) u_mul (.x(b), .y(a), .p(p));
      end else begin : g_col
        mult_2xk #(.K(WB)) u_mul (.x(a), .y(b), .p(p));
      end
    end else begin : g_lut
      mult_lut_tile #(.WA(WA), .WB(WB)) u_mul (.a(a), .b(b), .p(p));
    end

    assign ops[i] = (F + 1)'(p) << (TX + TY);
  end

  compressor_tree #(.N(NOPS), .W(F + 1)) u_tree (.ops(ops), .sum(sum));

  assign P = sum[F] ? '1 : sum[F-1:LP];

endmodule
