// mult_2xk: 2 x k unsigned sub-multiplier built from two partial-product rows
// and one carry-chain adder.
//
// p = y*x[0] + (y*x[1] << 1): the two rows are AND gates (one LUT per bit
// pair on an FPGA) and their sum runs along the fast carry chain. This is the
// unsigned form of two rows of a Baugh-Wooley array, which is how the tile is
// characterised (cost 1.65k + 2.3 LUTs). Combinational.
//
// Interface: x (2 bits), y (K bits), p = x * y (K + 2 bits).
module mult_2xk #(
  parameter int unsigned K = 8
) (
  input  logic [1:0]   x,
  input  logic [K-1:0] y,
  output logic [K+1:0] p
);

  logic [K-1:0] row0, row1;

  always_comb begin
    row0 = y & {K{x[0]}};
    row1 = y & {K{x[1]}};
    p    = (K + 2)'(row0) + ((K + 2)'(row1) << 1);
  end

endmodule
