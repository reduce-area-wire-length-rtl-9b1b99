// One-hot line decoder (the 4x16 row decoder and the 4x16 column decoder of
// the modified RAM).
//
// With `en` high exactly one of the 2**IN_W output lines is high: the one
// numbered by `a`. With `en` low all lines are low, so no row (or column) of
// the word matrix is selected. Purely combinational.
//
// The 4-to-16 size follows the design description; the enable input, driven
// by the RAM's RCDE pin, is this design's reading of that pin.
module line_decoder #(
  parameter int unsigned IN_W = 4
) (
  input  logic                 en,
  input  logic [IN_W-1:0]      a,
  output logic [(1<<IN_W)-1:0] y
);

  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < (1 << IN_W); i++)
      y[i] = en && (a == IN_W'(i));
  end

endmodule
