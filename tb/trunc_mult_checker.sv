// trunc_mult_checker: drives one trunc_mult instance of a given size with
// NVEC random operands plus the corner cases, checks each output bit-exactly
// against the tmul_tb_pkg model and against the faithful-rounding bound, and
// reports its counts on its outputs. Also checks the tiling the block was
// built with: no overlapping tiles and an error within the faithful bound.
// Used by the sweep testbench; one time unit per vector.
module trunc_mult_checker
  import tmul_pkg::*;
  import tmul_tb_pkg::*;
#(
  parameter int WX = 8,
  parameter int WY = 8,
  parameter int WP = 8,
  parameter int NUM_DSP = 0,
  parameter int NVEC = 500
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_omit,
  output int   n_sat
);
  logic [WX-1:0] X;
  logic [WY-1:0] Y;
  logic [WP-1:0] P;

  trunc_mult #(.WX(WX), .WY(WY), .WP(WP), .NUM_DSP(NUM_DSP)) dut (.X(X), .Y(Y), .P(P));

  task automatic apply(input logic [63:0] xv, input logic [63:0] yv, input tiling_t tg,
                       input rowmask_t m);
    logic [63:0] e;
    X = WX'(xv);
    Y = WY'(yv);
    #1;
    e = expected(WX, WY, WP, tg, m, 64'(X), 64'(Y));
    checks += 2;
    if (64'(P) != e) begin
      failures++;
      if (failures < 5) $display("FAIL %0dx%0d/%0d d%0d: X=%h Y=%h P=%h expected %h",
                                 WX, WY, WP, NUM_DSP, X, Y, P, e);
    end
    if (!faithful(WX, WY, WP, 64'(P), 64'(X), 64'(Y))) begin
      failures++;
      if (failures < 5) $display("FAIL %0dx%0d/%0d d%0d not faithful: X=%h Y=%h P=%h",
                                 WX, WY, WP, NUM_DSP, X, Y, P);
    end
    if (omitted(WY, m, 64'(X), 64'(Y)) != 0) n_omit++;
    if ((128'(X) * 128'(Y) + tg.c_const - omitted(WY, m, 64'(X), 64'(Y)) +
         ((WX + WY > WP) ? (128'd1 << (WX + WY - WP - 1)) : 0)) >= (128'd1 << (WX + WY)))
      n_sat++;
  endtask

  initial begin
    tiling_t  tg;
    rowmask_t m;
    done = 0; checks = 0; failures = 0; n_omit = 0; n_sat = 0;
    tg = build_tiling(WX, WY, WP, NUM_DSP);
    m  = coverage(WX, WY, tg);
    checks += 2;
    if (tiling_overlaps(WX, WY, tg) != 0) failures++;
    if (!tiling_faithful(WX, WY, WP, tg)) failures++;
    apply('0, '0, tg, m);
    apply('1, '1, tg, m);
    for (int i = 0; i < NVEC; i++) begin
      logic [63:0] a, b;
      a = rand64();
      b = rand64();
      if (i % 3 == 1) a = a | ~(64'hFFFF_FFFF_FFFF_FFFF << ($urandom % WX));
      if (i % 3 == 2) b = '1;
      apply(a, b, tg, m);
    end
    done = 1;
  end
endmodule
