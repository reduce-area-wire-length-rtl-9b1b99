// Self-checking testbench for mram_word_array: fills all 256 words through
// one-hot row/column lines, reads them all back, then runs random reads and
// writes (including cycles with no line selected) against a reference array.
module tb_mram_word_array;
  logic        clk = 1'b0;
  logic [15:0] row_sel, col_sel;
  logic        rd;
  logic [15:0] d, q;
  logic [15:0] ref_mem [16][16];
  int checks = 0, failures = 0;

  mram_word_array dut (.clk(clk), .row_sel(row_sel), .col_sel(col_sel),
                       .rd(rd), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_write(int r, int c, logic [15:0] v);
    row_sel = 16'h1 << r; col_sel = 16'h1 << c; rd = 1'b0; d = v;
    @(posedge clk); ref_mem[r][c] = v;
    @(negedge clk);
  endtask

  task automatic do_read(int r, int c);
    row_sel = 16'h1 << r; col_sel = 16'h1 << c; rd = 1'b1; d = 16'($urandom);
    #1;
    checks++;
    if (q !== ref_mem[r][c]) begin
      failures++; $display("read [%0d][%0d] = %h expected %h", r, c, q, ref_mem[r][c]);
    end
    @(negedge clk);
  endtask

  initial begin
    row_sel = '0; col_sel = '0; rd = 1'b1; d = '0;
    @(negedge clk);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        do_write(r, c, 16'((r * 16 + c) * 16'h0101 ^ 16'hA5C3));
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++)
        do_read(r, c);
    for (int i = 0; i < 1000; i++) begin
      int unsigned op;
      int r, c;
      op = $urandom_range(0, 2);
      r  = $urandom_range(0, 15);
      c  = $urandom_range(0, 15);
      if (op == 0) do_write(r, c, 16'($urandom));
      else if (op == 1) do_read(r, c);
      else begin
        // nothing selected: write must not land, output must be zero
        row_sel = (i % 2 == 1) ? 16'h1 << r : '0; col_sel = (i % 2 == 1) ? '0 : 16'h1 << c;
        rd = 1'($urandom); d = 16'($urandom);
        #1; checks++;
        if (q !== 16'h0) begin failures++; $display("unselected q=%h", q); end
        @(posedge clk); @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
