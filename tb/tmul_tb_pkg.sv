// tmul_tb_pkg: reference model shared by the truncated-multiplier testbenches.
//
// The model works from the tiling alone, position by position: it marks the
// board positions the tiles cover, takes the exact product, removes the
// partial products of uncovered positions, adds the constant C and the round
// bit, and keeps the top WP bits (all ones if the sum reaches 2^(WX+WY)).
// It shares no structure with the RTL (no tile multipliers, no tree).
package tmul_tb_pkg;
  import tmul_pkg::*;

  typedef logic [63:0] rowmask_t [64];

  // Bit x of mask[y] is set when position (x, y) is covered by some tile.
  function automatic rowmask_t coverage(input int wx, input int wy, input tiling_t tg);
    rowmask_t m;
    for (int y = 0; y < 64; y++) m[y] = '0;
    for (int i = 0; i < int'(tg.n); i++)
      for (int y = int'(tg.tiles[i].y); y < int'(tg.tiles[i].y) + int'(tg.tiles[i].wb); y++)
        for (int x = int'(tg.tiles[i].x); x < int'(tg.tiles[i].x) + int'(tg.tiles[i].wa); x++)
          if (x < wx && y < wy) m[y][x] = 1'b1;
    return m;
  endfunction

  // Value of the partial products that no tile computes.
  function automatic logic [127:0] omitted(input int wy, input rowmask_t m,
                                           input logic [63:0] x, input logic [63:0] y);
    logic [127:0] s;
    logic [63:0]  u;
    s = '0;
    for (int j = 0; j < wy; j++) begin
      u = x & ~m[j];
      if (y[j]) s += 128'(u) << j;
    end
    return s;
  endfunction

  // Value of the covered partial products of weight below `lim`.
  function automatic logic [127:0] covered_below(input int wy, input rowmask_t m,
                                                 input logic [63:0] x, input logic [63:0] y,
                                                 input int lim);
    logic [127:0] s, pp;
    s = '0;
    for (int j = 0; j < wy; j++)
      if (y[j]) begin
        pp = 128'(x & m[j]) << j;
        s += pp & ((128'd1 << lim) - 1);
      end
    return s;
  endfunction

  // Expected output word.
  function automatic logic [63:0] expected(input int wx, input int wy, input int wp,
                                           input tiling_t tg, input rowmask_t m,
                                           input logic [63:0] x, input logic [63:0] y);
    logic [127:0] s;
    int f, lp;
    f  = wx + wy;
    lp = f - wp;
    s  = 128'(x) * 128'(y) - omitted(wy, m, x, y) + tg.c_const;
    if (lp > 0) s += 128'd1 << (lp - 1);
    if (s >= (128'd1 << f)) return 64'((128'd1 << wp) - 1);
    return 64'(s >> lp);
  endfunction

  // |P * 2^lp - x*y| < 2^lp
  function automatic bit faithful(input int wx, input int wy, input int wp, input logic [63:0] p,
                                  input logic [63:0] x, input logic [63:0] y);
    logic [127:0] ex, pv;
    int lp;
    lp = wx + wy - wp;
    ex = 128'(x) * 128'(y);
    pv = 128'(p) << lp;
    return (pv >= ex) ? ((pv - ex) < (128'd1 << lp)) : ((ex - pv) < (128'd1 << lp));
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction
endpackage
