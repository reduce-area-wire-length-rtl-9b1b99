// Self-checking testbench for addr_reg: reset value, load on strobe, hold
// without strobe, checked against a reference register kept in the bench.
module tb_addr_reg;
  logic       clk = 1'b0;
  logic       rst_n, load;
  logic [3:0] d, q, ref_q;
  int checks = 0, failures = 0;

  addr_reg dut (.clk(clk), .rst_n(rst_n), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1; load = 1'b0; d = 4'hA;
    #1 rst_n = 1'b0;
    #1;
    checks++; if (q !== 4'h0) begin failures++; $display("reset: q=%h", q); end
    @(negedge clk); rst_n = 1'b1; ref_q = 4'h0;
    for (int i = 0; i < 200; i++) begin
      load = 1'($urandom);
      d    = 4'($urandom);
      @(posedge clk);
      if (load) ref_q = d;
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++; $display("cycle %0d: q=%h expected %h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
