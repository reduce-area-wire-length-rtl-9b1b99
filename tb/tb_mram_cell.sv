// Self-checking testbench for mram_cell: the cell must store only when both
// select lines are high and rd is low, and must show its value only when
// both lines are high and rd is high. Random stimulus against a reference.
module tb_mram_cell;
  logic clk = 1'b0;
  logic row_sel, col_sel, rd;
  logic [7:0] d, q, ref_bits, expect_q;
  int checks = 0, failures = 0;

  mram_cell #(.W(8)) dut (.clk(clk), .row_sel(row_sel), .col_sel(col_sel),
                          .rd(rd), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initial write so the reference is known
    row_sel = 1'b1; col_sel = 1'b1; rd = 1'b0; d = 8'h5A;
    @(posedge clk); ref_bits = 8'h5A;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      row_sel = 1'($urandom); col_sel = 1'($urandom);
      rd = 1'($urandom); d = 8'($urandom);
      #1;
      expect_q = (row_sel && col_sel && rd) ? ref_bits : 8'h00;
      checks++;
      if (q !== expect_q) begin
        failures++; $display("step %0d: q=%h expected %h", i, q, expect_q);
      end
      @(posedge clk);
      if (row_sel && col_sel && !rd) ref_bits = d;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
