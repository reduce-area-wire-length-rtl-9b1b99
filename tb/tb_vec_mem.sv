// Self-checking testbench for vec_mem. Keeps its own 16 x 16 bit matrix and
// works out each word by the rule of its tag: row, column, main diagonal or
// anti-diagonal. Writes every row, reads every row, column and both
// diagonals, then mixes random writes and reads in all four directions.
module tb_vec_mem;
  import mram_pkg::*;
  localparam int N = 16;
  logic           clk = 1'b0;
  logic           we;
  vec_tag_e       tag;
  logic [3:0]     addr;
  logic [N-1:0]   din, dout;
  logic [N-1:0]   ref_m [N];
  int checks = 0, failures = 0;

  vec_mem dut (.clk(clk), .we(we), .tag(tag), .addr(addr), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] ref_word(vec_tag_e t, int a);
    logic [N-1:0] w;
    for (int i = 0; i < N; i++)
      case (t)
        TAG_ROW:  w[i] = ref_m[a][i];
        TAG_COL:  w[i] = ref_m[i][a];
        TAG_DIAG: w[i] = ref_m[i][i];
        default:  w[i] = ref_m[i][N-1-i];
      endcase
    return w;
  endfunction

  task automatic ref_write(vec_tag_e t, int a, logic [N-1:0] v);
    for (int i = 0; i < N; i++)
      case (t)
        TAG_ROW:  ref_m[a][i] = v[i];
        TAG_COL:  ref_m[i][a] = v[i];
        TAG_DIAG: ref_m[i][i] = v[i];
        default:  ref_m[i][N-1-i] = v[i];
      endcase
  endtask

  task automatic do_write(vec_tag_e t, int a, logic [N-1:0] v);
    we = 1'b1; tag = t; addr = 4'(a); din = v;
    @(posedge clk); ref_write(t, a, v); @(negedge clk);
    we = 1'b0;
  endtask

  task automatic do_read(vec_tag_e t, int a);
    we = 1'b0; tag = t; addr = 4'(a); din = N'($urandom);
    #1; checks++;
    if (dout !== ref_word(t, a)) begin
      failures++; $display("read tag %s addr %0d: %h expected %h", t.name(), a, dout, ref_word(t, a));
    end
    @(negedge clk);
  endtask

  initial begin
    we = 1'b0; tag = TAG_ROW; addr = '0; din = '0;
    @(negedge clk);
    for (int r = 0; r < N; r++) do_write(TAG_ROW, r, N'(16'h1357 * (r + 1)));
    for (int a = 0; a < N; a++) begin
      do_read(TAG_ROW, a); do_read(TAG_COL, a);
    end
    do_read(TAG_DIAG, 0); do_read(TAG_ANTI, 5);
    // a column write, then the rows it crosses must have changed
    do_write(TAG_COL, 3, 16'hF00F);
    for (int a = 0; a < N; a++) do_read(TAG_ROW, a);
    do_write(TAG_DIAG, 9, 16'h0FF0);
    do_write(TAG_ANTI, 2, 16'hAAAA);
    for (int a = 0; a < N; a++) do_read(TAG_COL, a);
    for (int i = 0; i < 3000; i++) begin
      vec_tag_e t;
      int a;
      t = vec_tag_e'($urandom_range(0, 3));
      a = $urandom_range(0, N - 1);
      if ($urandom_range(0, 2) == 0) do_write(t, a, N'($urandom));
      else do_read(t, a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
