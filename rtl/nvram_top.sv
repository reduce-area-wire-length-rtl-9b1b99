// Top level: the modified 256 x 16 RAM and the row/column/diagonal vector
// memory, side by side.
//
// The two memories are independent and share only the clock. The first is
// the 256-word, 16-bit RAM with a multiplexed 4-bit address (RAS/CAS),
// decoder enable RCDE and read/write pin r_w; see mram_256x16 for its
// protocol. The second is a 16 x 16 bit vector memory whose 16-bit words
// are taken along a row, a column or a diagonal, chosen by a 2-bit tag; see
// vec_mem. Both read combinationally and write on the rising clock edge.
module nvram_top
  import mram_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // modified 256 x 16 RAM
  input  logic                   ras,
  input  logic                   cas,
  input  logic                   rcde,
  input  logic                   r_w,
  input  logic [HALF_ADDR_W-1:0] address,
  input  logic [WORD_W-1:0]      data_in,
  output logic [WORD_W-1:0]      data_out,
  // row/column/diagonal vector memory
  input  logic                   vec_we,
  input  vec_tag_e               vec_tag,
  input  logic [$clog2(WORD_W)-1:0] vec_addr,
  input  logic [WORD_W-1:0]      vec_din,
  output logic [WORD_W-1:0]      vec_dout
);

  mram_256x16 u_mram (
    .clk      (clk),
    .rst_n    (rst_n),
    .ras      (ras),
    .cas      (cas),
    .rcde     (rcde),
    .r_w      (r_w),
    .address  (address),
    .data_in  (data_in),
    .data_out (data_out)
  );

  vec_mem #(.N(WORD_W)) u_vec (
    .clk  (clk),
    .we   (vec_we),
    .tag  (vec_tag),
    .addr (vec_addr),
    .din  (vec_din),
    .dout (vec_dout)
  );

endmodule
