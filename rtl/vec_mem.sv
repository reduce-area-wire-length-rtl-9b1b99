// Vector memory with row, column and diagonal word access.
//
// An N x N matrix of bits holds N horizontal words, N vertical words and
// two diagonal words, all overlapping. A word is named by log2(N) address
// bits plus a 2-bit tag that says how it is formed (see mram_pkg::vec_tag_e):
//   TAG_ROW  word <addr> is row <addr>:           bit i = m[addr][i]
//   TAG_COL  word <addr> is column <addr>:        bit i = m[i][addr]
//   TAG_DIAG the main diagonal (addr ignored):    bit i = m[i][i]
//   TAG_ANTI the anti-diagonal (addr ignored):    bit i = m[i][N-1-i]
// So one access moves N bits in any of the three directions, where a
// conventional memory could only move a row.
//
// Reads are combinational: `dout` always shows the word named by tag and
// addr. A write stores `din` into that word's N cells at the rising clock
// edge when `we` is high; the other cells keep their values. The matrix has
// no reset.
//
// Follows the description: N horizontal, N vertical and 2 diagonal words,
// log2(N) address bits plus 2 tag bits, N data lines in and N out, and
// N = 16 to match the 16-bit word of the RAM. This design's choices: the
// tag encoding, the diagonal orientation, the clocked write with a write
// enable and the combinational read.
module vec_mem
  import mram_pkg::*;
#(
  parameter int unsigned N = WORD_W
) (
  input  logic                 clk,
  input  logic                 we,
  input  vec_tag_e             tag,
  input  logic [$clog2(N)-1:0] addr,
  input  logic [N-1:0]         din,
  output logic [N-1:0]         dout
);

  localparam int unsigned AW = $clog2(N);

  logic [N-1:0] m [N];   // m[row][column]

  // Row and column of bit i of the word named by (t, a).
  function automatic logic [2*AW-1:0] cell_of(vec_tag_e t, logic [AW-1:0] a,
                                               int unsigned i);
    logic [AW-1:0] r, c;
    unique case (t)
      TAG_ROW:  begin r = a;               c = AW'(i);           end
      TAG_COL:  begin r = AW'(i);          c = a;                end
      TAG_DIAG: begin r = AW'(i);          c = AW'(i);           end
      default:  begin r = AW'(i);          c = AW'(N - 1 - i);   end
    endcase
    return {r, c};
  endfunction

  always_comb begin
    logic [2*AW-1:0] rc;
    for (int unsigned i = 0; i < N; i++) begin
      rc      = cell_of(tag, addr, i);
      dout[i] = m[rc[2*AW-1:AW]][rc[AW-1:0]];
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int unsigned i = 0; i < N; i++) begin
        logic [2*AW-1:0] wc;
        wc = cell_of(tag, addr, i);
        m[wc[2*AW-1:AW]][wc[AW-1:0]] <= din[i];
      end
    end
  end

endmodule
