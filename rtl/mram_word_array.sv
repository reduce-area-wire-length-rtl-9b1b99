// Word matrix of the modified RAM: LINES x LINES words of WORD_W bits
// (16 x 16 x 16 = 4096 storage bits by default).
//
// Every word is an mram_cell wired to one row line and one column line. The
// row and column decoders drive at most one line each, so at most one word
// is selected. A write (rd low) stores `d` into the selected word on the
// rising clock edge; a read (rd high) places the selected word on `q`
// combinationally. The outputs of all words are ORed together to form `q`,
// which is legal because unselected words drive zero; with no word selected
// `q` is 0.
//
// The 16 x 16 organisation of 16-bit words follows the design description;
// the OR-combined read path is this design's choice for the output side,
// which the description does not detail. An assertion checks that at most
// one row line and one column line are high at each clock edge.
module mram_word_array
  import mram_pkg::*;
(
  input  logic              clk,
  input  logic [LINES-1:0]  row_sel,  // one-hot or zero, from the row decoder
  input  logic [LINES-1:0]  col_sel,  // one-hot or zero, from the column decoder
  input  logic              rd,       // 1: read, 0: write
  input  logic [WORD_W-1:0] d,
  output logic [WORD_W-1:0] q
);

  logic [WORD_W-1:0] cell_q [LINES][LINES];

  for (genvar r = 0; r < LINES; r++) begin : g_row
    for (genvar c = 0; c < LINES; c++) begin : g_col
      mram_cell #(.W(WORD_W)) u_cell (
        .clk     (clk),
        .row_sel (row_sel[r]),
        .col_sel (col_sel[c]),
        .rd      (rd),
        .d       (d),
        .q       (cell_q[r][c])
      );
    end
  end

  // The OR-combined read path is only correct if the decoders select at
  // most one row line and at most one column line.
  a_one_row_one_col: assert property (@(posedge clk) $onehot0(row_sel) && $onehot0(col_sel))
    else $error("more than one row or column line selected");

  always_comb begin
    q = '0;
    for (int r = 0; r < LINES; r++)
      for (int c = 0; c < LINES; c++)
        q |= cell_q[r][c];
  end

endmodule
