// Self-checking testbench for line_decoder: every input value with the
// enable high and low, compared with a one-hot value built by shifting.
module tb_line_decoder;
  logic        en;
  logic [3:0]  a;
  logic [15:0] y;
  int checks = 0, failures = 0;

  line_decoder dut (.en(en), .a(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 16; i++) begin
        logic [15:0] expect_y;
        en = e[0]; a = 4'(i);
        expect_y = e[0] ? (16'h0001 << i) : 16'h0000;
        #1;
        checks++;
        if (y !== expect_y) begin
          failures++; $display("en=%0d a=%0d y=%h expected %h", e, i, y, expect_y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
