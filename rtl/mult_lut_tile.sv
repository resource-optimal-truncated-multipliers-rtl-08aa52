// mult_lut_tile: small logic-based unsigned sub-multiplier (tile shapes 1x1,
// 1x2, 2x3 and 3x3 of the FPGA tile library).
//
// With at most six input bits every product bit is a function of at most six
// inputs, so each output bit fits one 6-input LUT. The module writes the
// product as a sum of AND-gate partial-product rows and leaves the LUT mapping
// to synthesis; the document gives only the function and the LUT costs, so
// this structure is this design's own.
//
// Interface: a (WA bits, the X slice), b (WB bits, the Y slice), p = a * b
// (WA + WB bits). Purely combinational, no latency.
module mult_lut_tile #(
  parameter int unsigned WA = 3,
  parameter int unsigned WB = 3
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] p
);

  always_comb begin
    p = '0;
    for (int j = 0; j < int'(WB); j++)
      p += (WA + WB)'(a & {WA{b[j]}}) << j;
  end

  initial begin
    assert (WA * WB <= 9) else $error("mult_lut_tile: %0dx%0d is not a LUT tile", WA, WB);
  end

endmodule
