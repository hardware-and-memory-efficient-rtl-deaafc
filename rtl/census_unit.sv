// census_unit: 3x3 census transform of one pixel.
//
// Each of the eight neighbours of the centre pixel gives one bit, set when
// the neighbour is darker than the centre. Bit order: row-major over the
// window, skipping the centre (bit 0 = top-left, bit 7 = bottom-right).
// A neighbour outside the image (nb_valid bit low) contributes 0. The window
// size and bit order are this implementation's choices; the design names
// AD-Census as its data term without giving its window. Combinational.
module census_unit #(
  parameter int unsigned PIX_W = bp_pkg::PIX_W
) (
  input  logic [PIX_W-1:0] center,
  input  logic [PIX_W-1:0] nb       [8],
  input  logic [7:0]       nb_valid,
  output logic [7:0]       code
);
  always_comb begin
    for (int i = 0; i < 8; i++)
      code[i] = nb_valid[i] && (nb[i] < center);
  end
endmodule
