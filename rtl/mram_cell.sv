// Storage cell of the modified RAM, selected in two dimensions.
//
// The cell is enabled only when both its row line and its column line are
// high (a two-input AND, the "2-D memory selection"). Reading and writing
// are asymmetric, as in a classic static RAM bit: with `rd` high the stored
// value is placed on `q` combinationally and the clock pulse is suppressed;
// with `rd` low the cell takes `d` on the rising clock edge. An unselected
// cell drives `q` low so that the outputs of many cells can be ORed onto a
// shared data line.
//
// One bit per cell (W = 1) follows the description; the array instantiates
// it with W = 16, one cell per word, which is the same 16 bits side by side.
// The storage is a flip-flop without reset: a RAM's contents are undefined
// until written.
module mram_cell #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         row_sel,  // row line of the cell
  input  logic         col_sel,  // column line of the cell
  input  logic         rd,       // 1: read, 0: write
  input  logic [W-1:0] d,
  output logic [W-1:0] q         // stored value when selected for read, else 0
);

  logic         sel;
  logic [W-1:0] bits;

  assign sel = row_sel && col_sel;

  always_ff @(posedge clk)
    if (sel && !rd) bits <= d;

  assign q = (sel && rd) ? bits : '0;

endmodule
