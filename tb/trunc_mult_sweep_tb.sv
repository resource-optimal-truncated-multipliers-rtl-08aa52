// trunc_mult_sweep_tb: runs the truncated multiplier over the two size
// series used to evaluate it:
//  * square multipliers WX = WY = WP = 2 .. 32, logic only (0 DSP) and with
//    one DSP tile (16 .. 32);
//  * a 32 x 32 multiplier with output widths WP = 1 .. 64, logic only and
//    with one DSP tile (16 .. 64).
// A selection of sizes from both series is run (the full series differ only
// in size). Each size is one trunc_mult_checker (bit-exact model plus faithful-rounding
// bound on random and corner operands). Mechanisms counted over the sweep:
// left-out partial products used, exact products (WP = WX + WY, nothing left
// out) and output saturation (rounded sum reaching 2^(WX+WY), only possible
// for very narrow outputs).
module trunc_mult_sweep_tb;
  localparam int NVEC = 300;
  // One entry per size: {WX, WY, WP, NUM_DSP}, 8 bits each.
  localparam int NALL = 39;
  function automatic logic [31:0] cfg(input int k);
    case (k)
      // square, logic only
      0: return {8'd2, 8'd2, 8'd2, 8'd0};
      1: return {8'd3, 8'd3, 8'd3, 8'd0};
      2: return {8'd4, 8'd4, 8'd4, 8'd0};
      3: return {8'd5, 8'd5, 8'd5, 8'd0};
      4: return {8'd7, 8'd7, 8'd7, 8'd0};
      5: return {8'd8, 8'd8, 8'd8, 8'd0};
      6: return {8'd12, 8'd12, 8'd12, 8'd0};
      7: return {8'd16, 8'd16, 8'd16, 8'd0};
      8: return {8'd20, 8'd20, 8'd20, 8'd0};
      9: return {8'd24, 8'd24, 8'd24, 8'd0};
      10: return {8'd26, 8'd26, 8'd26, 8'd0};
      11: return {8'd32, 8'd32, 8'd32, 8'd0};
      // square, one DSP
      12: return {8'd16, 8'd16, 8'd16, 8'd1};
      13: return {8'd17, 8'd17, 8'd17, 8'd1};
      14: return {8'd20, 8'd20, 8'd20, 8'd1};
      15: return {8'd24, 8'd24, 8'd24, 8'd1};
      16: return {8'd26, 8'd26, 8'd26, 8'd1};
      17: return {8'd32, 8'd32, 8'd32, 8'd1};
      // 32 x 32, output width swept, logic only
      18: return {8'd32, 8'd32, 8'd1, 8'd0};
      19: return {8'd32, 8'd32, 8'd2, 8'd0};
      20: return {8'd32, 8'd32, 8'd8, 8'd0};
      21: return {8'd32, 8'd32, 8'd16, 8'd0};
      22: return {8'd32, 8'd32, 8'd24, 8'd0};
      23: return {8'd32, 8'd32, 8'd31, 8'd0};
      24: return {8'd32, 8'd32, 8'd33, 8'd0};
      25: return {8'd32, 8'd32, 8'd40, 8'd0};
      26: return {8'd32, 8'd32, 8'd48, 8'd0};
      27: return {8'd32, 8'd32, 8'd56, 8'd0};
      28: return {8'd32, 8'd32, 8'd63, 8'd0};
      29: return {8'd32, 8'd32, 8'd64, 8'd0};
      // 32 x 32, output width swept, one DSP
      30: return {8'd32, 8'd32, 8'd16, 8'd1};
      31: return {8'd32, 8'd32, 8'd24, 8'd1};
      32: return {8'd32, 8'd32, 8'd33, 8'd1};
      33: return {8'd32, 8'd32, 8'd40, 8'd1};
      34: return {8'd32, 8'd32, 8'd48, 8'd1};
      35: return {8'd32, 8'd32, 8'd56, 8'd1};
      36: return {8'd32, 8'd32, 8'd63, 8'd1};
      37: return {8'd32, 8'd32, 8'd64, 8'd1};
      38: return {8'd32, 8'd32, 8'd1, 8'd1};
      default: return '0;
    endcase
  endfunction

  logic done [NALL];
  int   chk  [NALL];
  int   fail [NALL];
  int   omit [NALL];
  int   sat  [NALL];

  for (genvar k = 0; k < NALL; k++) begin : g_cfg
    localparam logic [31:0] C = cfg(k);
    trunc_mult_checker #(.WX(int'(C[31:24])), .WY(int'(C[23:16])),
                         .WP(int'(C[15:8])), .NUM_DSP(int'(C[7:0])), .NVEC(NVEC)) u (
      .done(done[k]), .checks(chk[k]), .failures(fail[k]), .n_omit(omit[k]), .n_sat(sat[k]));
  end

  initial begin
    int checks, failures, n_omit, n_sat, n_exact;
    bit all_done;
    all_done = 0;
    while (!all_done) begin
      #10;
      all_done = 1;
      for (int k = 0; k < NALL; k++) if (!done[k]) all_done = 0;
    end
    checks = 0; failures = 0; n_omit = 0; n_sat = 0; n_exact = 0;
    for (int k = 0; k < NALL; k++) begin
      checks += chk[k];
      failures += fail[k];
      n_omit += omit[k];
      n_sat += sat[k];
      if (omit[k] == 0) n_exact++;
    end
    $display("sizes=%0d omitted=%0d saturated=%0d sizes_without_omission=%0d",
             NALL, n_omit, n_sat, n_exact);
    checks += 3;
    if (n_omit == 0)  begin failures++; $display("FAIL: no omitted partial product"); end
    if (n_sat == 0)   begin failures++; $display("FAIL: no saturation"); end
    if (n_exact == 0) begin failures++; $display("FAIL: no exact configuration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NVEC + 10) * 10);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
