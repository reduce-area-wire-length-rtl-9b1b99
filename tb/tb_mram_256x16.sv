// Self-checking testbench for mram_256x16. Drives the pins as a memory
// controller would: a RAS cycle (row half on the address bus), a CAS cycle
// (column half), then RCDE cycles with r_w = 0 (write) or 1 (read). Writes
// all 256 words, reads them back, then random accesses including column-only
// updates within a row, cycles with RCDE low (no write, zero output) and
// writes with the column loaded before the row. A reference array in the
// bench gives the expected data. It also checks the timing: a read needs
// exactly two address cycles, and the word appears in the cycle after CAS.
module tb_mram_256x16;
  logic        clk = 1'b0;
  logic        rst_n, ras, cas, rcde, r_w;
  logic [3:0]  address;
  logic [15:0] data_in, data_out;
  logic [15:0] ref_mem [256];
  logic [3:0]  cur_row, cur_col;
  int checks = 0, failures = 0;
  int cycle = 0;

  mram_256x16 dut (.clk(clk), .rst_n(rst_n), .ras(ras), .cas(cas), .rcde(rcde),
                   .r_w(r_w), .address(address), .data_in(data_in),
                   .data_out(data_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    ras = 1'b0; cas = 1'b0; rcde = 1'b0; r_w = 1'b1;
    address = 4'($urandom); data_in = 16'($urandom);
  endtask

  task automatic load_row(logic [3:0] r);
    idle(); ras = 1'b1; address = r;
    @(posedge clk); cur_row = r; @(negedge clk);
  endtask

  task automatic load_col(logic [3:0] c);
    idle(); cas = 1'b1; address = c;
    @(posedge clk); cur_col = c; @(negedge clk);
  endtask

  task automatic write_word(logic [15:0] v);
    idle(); rcde = 1'b1; r_w = 1'b0; data_in = v;
    #1; checks++;
    if (data_out !== 16'h0) begin failures++; $display("data_out=%h during write", data_out); end
    @(posedge clk); ref_mem[{cur_row, cur_col}] = v; @(negedge clk);
  endtask

  task automatic read_check();
    idle(); rcde = 1'b1; r_w = 1'b1;
    #1; checks++;
    if (data_out !== ref_mem[{cur_row, cur_col}]) begin
      failures++;
      $display("read row %0d col %0d: %h expected %h", cur_row, cur_col, data_out,
               ref_mem[{cur_row, cur_col}]);
    end
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b1; idle();
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill every word
    for (int a = 0; a < 256; a++) begin
      load_row(4'(a >> 4)); load_col(4'(a));
      write_word(16'(a * 16'h0102 + 16'h004A));
    end
    // read back every word
    for (int a = 0; a < 256; a++) begin
      load_row(4'(a >> 4)); load_col(4'(a));
      read_check();
    end
    // timing: from RAS to valid data is two address cycles, data valid
    // right after the CAS edge (combinational read)
    begin
      int t0, t1;
      t0 = cycle;
      load_row(4'h7); load_col(4'h3);
      idle(); rcde = 1'b1; r_w = 1'b1; #1;
      t1 = cycle;
      checks++;
      if ((t1 - t0) != 2 || data_out !== ref_mem[8'h73]) begin
        failures++; $display("access timing: %0d cycles, data %h", (t1 - t0), data_out);
      end
      @(negedge clk);
    end
    // random mix
    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(0, 5))
        0: load_row(4'($urandom));
        1: load_col(4'($urandom));
        2: write_word(16'($urandom));
        3: read_check();
        4: begin
          // RCDE low: nothing written, output zero
          idle(); r_w = 1'($urandom); #1; checks++;
          if (data_out !== 16'h0) begin failures++; $display("RCDE low: data_out=%h", data_out); end
          @(negedge clk);
        end
        default: begin
          // column before row
          load_col(4'($urandom)); load_row(4'($urandom));
          write_word(16'($urandom)); read_check();
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
