// Modified 256 x 16 RAM with two-dimensional word selection.
//
// Instead of one 8-to-256 decoder driving 256 word lines, the 256 words are
// arranged as a 16 x 16 matrix and selected by a row line and a column line.
// The 8-bit word address arrives in two 4-bit halves over one 4-bit address
// bus, in the manner of a multiplexed-address DRAM:
//   * RAS high at a rising clock edge loads the bus into the row register;
//   * CAS high at a rising clock edge loads the bus into the column register;
//   * RCDE (row/column decoder enable) high lets both 4x16 decoders select
//     the word at (row register, column register);
//   * r_w picks the operation on that word: 1 reads, 0 writes.
// A write stores `data_in` at the rising clock edge while RCDE is high and
// r_w is 0. A read is combinational: with RCDE and r_w high, `data_out`
// shows the selected word; otherwise `data_out` is 0.
//
// A complete access is therefore: RAS cycle, CAS cycle, then one or more
// RCDE cycles (RAS and CAS may be given in either order, and a new column
// alone may be loaded to reach another word of the same row). The word
// address is {row, column}.
//
// Follows the description: pin set RAS, CAS, RCDE, r_w, the 4-bit address,
// 16-bit data in and out, two 4-bit registers, two 4x16 decoders and the
// 16 x 16 word memory, r_w = 1 meaning read. This design's choices: the
// clock (the description names no clock pin), active-high strobes sampled
// at the clock edge, the active-low reset of the address registers and the
// meaning of RCDE as a decoder enable.
module mram_256x16
  import mram_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ras,       // load row register from address
  input  logic                   cas,       // load column register from address
  input  logic                   rcde,      // enable row and column decoders
  input  logic                   r_w,       // 1: read, 0: write
  input  logic [HALF_ADDR_W-1:0] address,   // multiplexed row/column address
  input  logic [WORD_W-1:0]      data_in,
  output logic [WORD_W-1:0]      data_out
);

  logic [HALF_ADDR_W-1:0] row_addr, col_addr;
  logic [LINES-1:0]       row_sel, col_sel;

  addr_reg #(.W(HALF_ADDR_W)) u_row_reg (
    .clk (clk), .rst_n (rst_n), .load (ras), .d (address), .q (row_addr)
  );

  addr_reg #(.W(HALF_ADDR_W)) u_col_reg (
    .clk (clk), .rst_n (rst_n), .load (cas), .d (address), .q (col_addr)
  );

  line_decoder #(.IN_W(HALF_ADDR_W)) u_row_dec (
    .en (rcde), .a (row_addr), .y (row_sel)
  );

  line_decoder #(.IN_W(HALF_ADDR_W)) u_col_dec (
    .en (rcde), .a (col_addr), .y (col_sel)
  );

  mram_word_array u_array (
    .clk     (clk),
    .row_sel (row_sel),
    .col_sel (col_sel),
    .rd      (r_w),
    .d       (data_in),
    .q       (data_out)
  );

endmodule
