// dsp_mult_24x17: the unsigned 24 x 17 multiplication that one DSP block of
// the target FPGA family performs (its signed 25 x 18 multiplier used with
// the sign bits at zero).
//
// Written as a plain product so that synthesis maps it onto one DSP block;
// the block's optional internal registers are not used (the document does
// not describe a pipelined multiplier), so the tile is combinational.
//
// Interface: a (24 bits, the X slice), b (17 bits, the Y slice),
// p = a * b (41 bits).
module dsp_mult_24x17 (
  input  logic [23:0] a,
  input  logic [16:0] b,
  output logic [40:0] p
);

  always_comb p = 41'(a) * 41'(b);

endmodule
