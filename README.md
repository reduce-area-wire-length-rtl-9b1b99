# 256 x 16 RAM with two-dimensional word selection, and a row/column/diagonal vector memory

A plain 256-word RAM selects a word with one 8-to-256 decoder: 256 word
lines, each running across the whole array, plus a wide OR tree on the
output. This design arranges the same 256 words of 16 bits as a
**16 x 16 matrix of words**. A word is picked by the crossing of one **row
line** and one **column line**. Each set of lines comes from a small 4-to-16
decoder. Two 16-line decoders replace one 256-line decoder. That cuts decoder
logic and wire length. The price is that the address now arrives in two
halves.

Next to the RAM sits a second, independent organisation of the same idea, a
**vector memory**. It is a 16 x 16 matrix of bits whose 16-bit words can be
read or written along a row, down a column, or along either diagonal, chosen
by a 2-bit tag.

Both are synthesizable SystemVerilog (IEEE 1800-2017). They are placed side by
side in `nvram_top`.

## The modified RAM (`mram_256x16`)

```
             address[3:0] ─┬──────────────┐
                           │              │
        RAS ─► row register (4b)   CAS ─► column register (4b)
                           │              │
       RCDE ─► 4x16 row decoder   RCDE ─► 4x16 column decoder
                           │ row_sel[16]  │ col_sel[16]
                           ▼              ▼
               16 x 16 word matrix (256 words x 16 bits)
        r_w ─►   cell(r,c) active when row_sel[r] & col_sel[c]
     data_in[15:0] ─►                        ─► data_out[15:0]
```

### Pins

| pin | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all state changes on its rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset of the two address registers |
| `ras` | in | 1 | row address strobe: load `address` into the row register |
| `cas` | in | 1 | column address strobe: load `address` into the column register |
| `rcde` | in | 1 | row/column decoder enable: no word is selected while it is low |
| `r_w` | in | 1 | 1 = read, 0 = write |
| `address` | in | 4 | multiplexed address bus: row half, then column half |
| `data_in` | in | 16 | write data |
| `data_out` | out | 16 | read data; 0 unless `rcde` and `r_w` are both high |

The word address is `{row, column}`, so word `8'hRC` lives at row `R`,
column `C`.

### Access sequence

All inputs are sampled on the rising edge of `clk`.

| cycle | ras | cas | rcde | r_w | address | effect |
|---|---|---|---|---|---|---|
| 1 | 1 | 0 | 0 | x | row | row register ← row |
| 2 | 0 | 1 | 0 | x | column | column register ← column |
| 3 | 0 | 0 | 1 | 0 | x | **write**: word(row, col) ← `data_in` at the edge |
| 3' | 0 | 0 | 1 | 1 | x | **read**: `data_out` = word(row, col), combinationally |

- A read therefore needs two address cycles. Data is valid in the cycle
  right after the CAS edge, with no further clock.
- RAS and CAS may come in either order.
- The registers hold their value, so several reads and writes can follow one
  address.
- Loading only a new column moves to another word of the same row.
- With `rcde` low, nothing is written and `data_out` is 0, whatever `r_w`
  says.

### Inside

- **`addr_reg`**: a W-bit register with a load strobe. It is used twice:
  once as the row register and once as the column register.
- **`line_decoder`**: a 4-to-16 one-hot decoder with an enable. It is used
  twice: once for rows and once for columns. Both enables are tied to `rcde`.
- **`mram_cell`**: the storage cell. It is selected only when its row line
  AND its column line are high. Reading and writing are asymmetric, as in a
  classic static RAM bit:
  - On a read, the clock pulse is suppressed and the stored value goes onto
    the output with no clock.
  - On a write, the cell loads on the clock edge. Address and data must
    therefore be stable at that edge.
  - An unselected cell drives 0.

  The cell is one bit by default. The matrix uses a 16-bit instance per word.
- **`mram_word_array`**: 256 cells wired to the 16 row lines and the
  16 column lines. Its output is the OR of all cell outputs. This works
  because at most one cell is selected and the rest drive 0.
  A concurrent assertion checks this condition at every clock edge: at most
  one row line and one column line may be high.

After generic synthesis, `mram_256x16` has 4104 flip-flop bits: 4096 storage
bits plus the two 4-bit address registers.

## The vector memory (`vec_mem`)

An ordinary memory moves one row per access. This one keeps an N x N bit
matrix `m[row][col]` (N = 16) and treats it as 2N + 2 overlapping N-bit
words:

| `tag` (`mram_pkg::vec_tag_e`) | word | bit i of the word |
|---|---|---|
| `TAG_ROW` (00) | row `addr` | `m[addr][i]` |
| `TAG_COL` (01) | column `addr` | `m[i][addr]` |
| `TAG_DIAG` (10) | main diagonal (`addr` ignored) | `m[i][i]` |
| `TAG_ANTI` (11) | anti-diagonal (`addr` ignored) | `m[i][N-1-i]` |

- **Addressing:** log2(N) word-address bits plus the 2 tag bits.
- **Data:** separate N-bit `din` and `dout` buses.
- **Read:** combinational. `dout` always shows the word named by `tag` and
  `addr`.
- **Write:** with `we` high, `din` is stored into that word's N cells at the
  rising clock edge. Every other cell keeps its value.

A column write therefore changes one bit of every row. A test can confirm
this by reading the rows back.

## Top level (`nvram_top`)

`nvram_top` instantiates `mram_256x16` and `vec_mem #(.N(16))`. They share
only `clk`. The RAM pins keep their names. The vector memory's pins carry the
prefix `vec_`: `vec_we`, `vec_tag`, `vec_addr`, `vec_din` and `vec_dout`.

## Where this departs from, or adds to, the original description

These choices were not specified and were made here:

- **Clock:** the RAM has a clock pin, and both strobes act on its rising
  edge. The original pin list has no clock.
- **Storage element:** cells are edge-triggered flip-flops, not the
  level-sensitive latches of the original implementation. This gives one
  clean timing reference.
- **Strobes:** RAS and CAS are active high.
- **RCDE:** it is read as an enable on both decoders.
- **Read path:** a read is combinational. `data_out` is 0 when nothing is
  being read.
- **Resets:** only the two address registers are reset. Memory contents are
  undefined until written.
- **Output OR:** the OR-combined output of the word matrix is a choice made
  here. The original description does not detail the RAM's output side.
- **Vector memory:** its tag encoding, diagonal orientation, write enable and
  combinational read are choices made here. The original gives only the
  word count (2N + 2) and the number of address and tag bits.
- **No connection between the memories:** how the vector organisation and
  the RAS/CAS RAM relate is not specified. They are therefore kept as two
  independent blocks.

Left out:

- **Serial FRAM chip:** the commercial serial (SPI) FRAM that served as the
  point of reference is not modelled.
- **Conventional RAM:** the 8-to-256-decoder RAM used as the comparison
  baseline is not part of this RTL.
- **Physical figures:** the published gate counts and pad-to-pad delays
  (68.66 ns for the two-dimensional RAM against 74.26 ns for the baseline)
  came from an FPGA flow. They say nothing about cycle timing and are not
  reproduced.

## Files

| file | content |
|---|---|
| `rtl/mram_pkg.sv` | `WORD_W` = 16, `HALF_ADDR_W` = 4, `LINES` = 16, tag type `vec_tag_e` |
| `rtl/addr_reg.sv` | row/column address register |
| `rtl/line_decoder.sv` | 4-to-16 decoder with enable |
| `rtl/mram_cell.sv` | two-dimensionally selected storage cell |
| `rtl/mram_word_array.sv` | 16 x 16 word matrix |
| `rtl/mram_256x16.sv` | the modified RAM |
| `rtl/vec_mem.sv` | row/column/diagonal vector memory |
| `rtl/nvram_top.sv` | top level |
| `tb/tb_<block>.sv` | one self-checking testbench per block |

## Simulating

Each testbench checks the block against a reference model kept inside the
bench, and prints `TB_RESULT checks=N failures=M`. Each has a watchdog.
`tb_nvram_top` runs the whole design at its default size:

- it writes and reads back all 256 RAM words;
- it writes and reads the vector memory in all four directions;
- it runs a random mix of accesses on both memories at once;
- it counts how often each mechanism occurred and fails if one never did.
  The mechanisms are: RAS load, CAS load, write, read, RCDE low, column-only
  re-addressing, and row, column, diagonal and anti-diagonal access.

`tb_mram_256x16` also checks the access latency.

```
verilator --binary --timing --assert -y rtl -y tb rtl/mram_pkg.sv \
          tb/tb_nvram_top.sv --top-module tb_nvram_top -Mdir obj_top
./obj_top/Vtb_nvram_top
```

Replace `tb_nvram_top` with `tb_mram_256x16`, `tb_vec_mem`,
`tb_mram_word_array`, `tb_mram_cell`, `tb_line_decoder` or `tb_addr_reg` to
run one block. Every testbench finishes in well under a second.

Verilator is a two-state simulator, and uninitialised storage starts at
arbitrary values. The benches therefore write every location before they
check it. The package is always listed first because the other files import
it.

## Changing the size

- **RAM:** the organisation follows `mram_pkg`. Changing `HALF_ADDR_W`
  changes the matrix to 2^HALF_ADDR_W x 2^HALF_ADDR_W words. Changing
  `WORD_W` changes the word width.
- **Vector memory:** it takes its size from its parameter `N`. `N` defaults
  to `WORD_W`, and `nvram_top` passes `WORD_W`, so its address port is
  log2(N) bits wide.
- **Top level:** `vec_addr` is `$clog2(WORD_W)` bits wide, which equals
  `HALF_ADDR_W` at the default sizes.
