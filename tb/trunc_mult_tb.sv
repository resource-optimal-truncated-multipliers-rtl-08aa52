// trunc_mult_tb: end-to-end test of the truncated multiplier at its default
// size (26 x 26 inputs, 26-bit faithfully rounded output, one DSP tile).
//
// Drives random operands, operands with long runs of ones, and the corner
// cases (zero, all ones, which maximises the left-out partial products), and
// checks every output twice: bit-exact against the position-by-position
// model of tmul_tb_pkg, and against the faithful-rounding bound
// |P*2^lP - X*Y| < 2^lP computed from the exact product. The block is
// combinational; each vector is given 1 time unit to settle.
//
// Mechanisms counted (each must occur at least once):
//  * omitted  - a left-out partial product is 1 (the tiling error is used)
//  * below    - a tile computes a nonzero product bit below the border of the
//               tiling (a tile reaching past the border, here the DSP)
//  * round_up / round_down - P*2^lP above / below the exact product
module trunc_mult_tb;
  import tmul_pkg::*;
  import tmul_tb_pkg::*;

  localparam int WX = 26, WY = 26, WP = 26;
  localparam int NVEC = 20000;

  logic [WX-1:0] X;
  logic [WY-1:0] Y;
  logic [WP-1:0] P;

  trunc_mult dut (.X(X), .Y(Y), .P(P));

  int checks = 0, failures = 0;
  int n_omit = 0, n_below = 0, n_up = 0, n_down = 0;

  task automatic apply(input logic [63:0] xv, input logic [63:0] yv, input tiling_t tg,
                       input rowmask_t m);
    logic [63:0] exp_p;
    logic [127:0] ex, pv;
    X = WX'(xv);
    Y = WY'(yv);
    #1;
    exp_p = expected(WX, WY, WP, tg, m, 64'(X), 64'(Y));
    checks += 2;
    if (64'(P) != exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL model: X=%h Y=%h P=%h expected %h", X, Y, P, exp_p);
    end
    if (!faithful(WX, WY, WP, 64'(P), 64'(X), 64'(Y))) begin
      failures++;
      if (failures < 10) $display("FAIL faithful: X=%h Y=%h P=%h", X, Y, P);
    end
    if (omitted(WY, m, 64'(X), 64'(Y)) != 0) n_omit++;
    if (covered_below(WY, m, 64'(X), 64'(Y), int'(tg.border)) != 0) n_below++;
    ex = 128'(X) * 128'(Y);
    pv = 128'(P) << (WX + WY - WP);
    if (pv > ex) n_up++;
    if (pv < ex) n_down++;
  endtask

  initial begin
    tiling_t  tg;
    rowmask_t m;
    tg = build_tiling(WX, WY, WP, 1);
    m  = coverage(WX, WY, tg);
    checks++;
    if (dut.NT != int'(tg.n)) begin
      failures++;
      $display("FAIL: the block uses %0d tiles, expected %0d", dut.NT, tg.n);
    end
    apply('0, '0, tg, m);
    apply('1, '1, tg, m);
    apply('1, 64'd1, tg, m);
    apply(64'd1, '1, tg, m);
    for (int i = 0; i < NVEC; i++) begin
      logic [63:0] a, b;
      a = rand64();
      b = rand64();
      if (i % 4 == 1) a = a | ~(64'hFFFF_FFFF_FFFF_FFFF << ($urandom % 26));
      if (i % 4 == 2) b = b | ~(64'hFFFF_FFFF_FFFF_FFFF << ($urandom % 26));
      apply(a, b, tg, m);
    end
    $display("mechanisms: omitted=%0d below_border=%0d round_up=%0d round_down=%0d",
             n_omit, n_below, n_up, n_down);
    checks += 4;
    if (n_omit == 0)  begin failures++; $display("FAIL: no omitted partial product"); end
    if (n_below == 0) begin failures++; $display("FAIL: no tile bit below the border"); end
    if (n_up == 0)    begin failures++; $display("FAIL: never rounded up"); end
    if (n_down == 0)  begin failures++; $display("FAIL: never rounded down"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NVEC * 2 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
