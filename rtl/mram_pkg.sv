// Shared constants and types of the 256 x 16 modified RAM and of the
// row/column/diagonal vector memory.
//
// The modified RAM stores 256 words of 16 bits as a 16 x 16 matrix of words.
// A word is addressed in two halves of HALF_ADDR_W bits over one shared
// address bus: the row half and the column half. The 16-bit word, the 4-bit
// address halves and the 16 x 16 organisation follow the design description;
// the encoding of the vector memory's access tag is this design's own choice.
package mram_pkg;

  // Width of one data word.
  parameter int unsigned WORD_W      = 16;
  // Width of the multiplexed address bus, i.e. of one address half.
  parameter int unsigned HALF_ADDR_W = 4;
  // Number of rows (and of columns) in the word matrix.
  parameter int unsigned LINES       = 1 << HALF_ADDR_W;

  // How the vector memory forms a word out of its N x N bit matrix.
  typedef enum logic [1:0] {
    TAG_ROW  = 2'b00,  // horizontal word: all bits of row <addr>
    TAG_COL  = 2'b01,  // vertical word: all bits of column <addr>
    TAG_DIAG = 2'b10,  // main diagonal: bit i of row i
    TAG_ANTI = 2'b11   // anti-diagonal: bit N-1-i of row i
  } vec_tag_e;

endpackage
