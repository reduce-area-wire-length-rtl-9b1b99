// End-to-end testbench for nvram_top at its default size (256 x 16 RAM,
// 16 x 16 bit vector memory).
//
// The RAM side runs a full pass: every one of the 256 words is written
// through RAS / CAS / RCDE cycles and read back, then a random mix of
// accesses follows. The vector side fills its matrix row by row and reads it
// back in every direction. Expected values come from reference arrays kept
// in the bench. Each mechanism of the design is counted - row-register load
// (RAS), column-register load (CAS), write, read, decoder disabled (RCDE low),
// a second word reached by reloading only the column, and vector accesses by
// row, column, main diagonal and anti-diagonal, read and write - and one that
// never happened counts as a failure.
module tb_nvram_top;
  import mram_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n, ras, cas, rcde, r_w;
  logic [3:0]  address;
  logic [15:0] data_in, data_out;
  logic        vec_we;
  vec_tag_e    vec_tag;
  logic [3:0]  vec_addr;
  logic [15:0] vec_din, vec_dout;

  logic [15:0] ram_ref [256];
  logic [15:0] vec_ref [16];
  logic [3:0]  cur_row, cur_col;
  int checks = 0, failures = 0;

  typedef enum int {
    EV_RAS, EV_CAS, EV_WRITE, EV_READ, EV_RCDE_OFF, EV_PAGE,
    EV_V_ROW, EV_V_COL, EV_V_DIAG, EV_V_ANTI, EV_V_WRITE, EV_COUNT
  } event_e;
  int unsigned seen [EV_COUNT];

  nvram_top dut (
    .clk(clk), .rst_n(rst_n),
    .ras(ras), .cas(cas), .rcde(rcde), .r_w(r_w), .address(address),
    .data_in(data_in), .data_out(data_out),
    .vec_we(vec_we), .vec_tag(vec_tag), .vec_addr(vec_addr),
    .vec_din(vec_din), .vec_dout(vec_dout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- RAM side ----------------
  task automatic ram_idle();
    ras = 1'b0; cas = 1'b0; rcde = 1'b0; r_w = 1'b1;
    address = 4'($urandom); data_in = 16'($urandom);
  endtask

  task automatic ram_row(logic [3:0] r);
    ram_idle(); ras = 1'b1; address = r;
    @(posedge clk); cur_row = r; seen[EV_RAS]++; @(negedge clk);
  endtask

  task automatic ram_col(logic [3:0] c);
    ram_idle(); cas = 1'b1; address = c;
    @(posedge clk); cur_col = c; seen[EV_CAS]++; @(negedge clk);
  endtask

  task automatic ram_write(logic [15:0] v);
    ram_idle(); rcde = 1'b1; r_w = 1'b0; data_in = v;
    @(posedge clk); ram_ref[{cur_row, cur_col}] = v; seen[EV_WRITE]++; @(negedge clk);
  endtask

  task automatic ram_read();
    ram_idle(); rcde = 1'b1; r_w = 1'b1;
    #1; checks++; seen[EV_READ]++;
    if (data_out !== ram_ref[{cur_row, cur_col}]) begin
      failures++;
      $display("RAM read %h: %h expected %h", {cur_row, cur_col}, data_out,
               ram_ref[{cur_row, cur_col}]);
    end
    @(negedge clk);
  endtask

  task automatic ram_rcde_off();
    ram_idle(); r_w = 1'($urandom);
    #1; checks++; seen[EV_RCDE_OFF]++;
    if (data_out !== 16'h0) begin failures++; $display("RCDE low: data_out=%h", data_out); end
    @(negedge clk);
  endtask

  // ---------------- vector side ----------------
  function automatic logic [15:0] vec_word(vec_tag_e t, int a);
    logic [15:0] w;
    for (int i = 0; i < 16; i++)
      case (t)
        TAG_ROW:  w[i] = vec_ref[a][i];
        TAG_COL:  w[i] = vec_ref[i][a];
        TAG_DIAG: w[i] = vec_ref[i][i];
        default:  w[i] = vec_ref[i][15-i];
      endcase
    return w;
  endfunction

  task automatic vec_write(vec_tag_e t, int a, logic [15:0] v);
    vec_we = 1'b1; vec_tag = t; vec_addr = 4'(a); vec_din = v;
    @(posedge clk);
    for (int i = 0; i < 16; i++)
      case (t)
        TAG_ROW:  vec_ref[a][i] = v[i];
        TAG_COL:  vec_ref[i][a] = v[i];
        TAG_DIAG: vec_ref[i][i] = v[i];
        default:  vec_ref[i][15-i] = v[i];
      endcase
    seen[EV_V_WRITE]++;
    @(negedge clk);
    vec_we = 1'b0;
  endtask

  task automatic vec_read(vec_tag_e t, int a);
    vec_we = 1'b0; vec_tag = t; vec_addr = 4'(a); vec_din = 16'($urandom);
    #1; checks++;
    case (t)
      TAG_ROW:  seen[EV_V_ROW]++;
      TAG_COL:  seen[EV_V_COL]++;
      TAG_DIAG: seen[EV_V_DIAG]++;
      default:  seen[EV_V_ANTI]++;
    endcase
    if (vec_dout !== vec_word(t, a)) begin
      failures++;
      $display("vector read %s %0d: %h expected %h", t.name(), a, vec_dout, vec_word(t, a));
    end
    @(negedge clk);
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 0;
    rst_n = 1'b1; ram_idle();
    vec_we = 1'b0; vec_tag = TAG_ROW; vec_addr = '0; vec_din = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // RAM: the data values 16'h004A and 16'h0012 first, then every word
    ram_row(4'h0); ram_col(4'h2); ram_write(16'h004A);
    ram_col(4'h3);                ram_write(16'h0012);  // same row, new column
    ram_col(4'h2); ram_read(); seen[EV_PAGE]++;
    ram_col(4'h3); ram_read();
    for (int a = 0; a < 256; a++) begin
      ram_row(4'(a >> 4)); ram_col(4'(a)); ram_write(16'(a * 16'h0111 ^ 16'h5A5A));
    end
    for (int a = 0; a < 256; a++) begin
      ram_row(4'(a >> 4)); ram_col(4'(a)); ram_read();
    end
    // a write attempted with RCDE low must leave memory unchanged
    ram_row(4'h9); ram_col(4'h9);
    ram_idle(); r_w = 1'b0; data_in = ~ram_ref[8'h99]; @(posedge clk); @(negedge clk);
    seen[EV_RCDE_OFF]++;
    ram_read();

    // vector memory: fill by rows, read back in every direction
    for (int r = 0; r < 16; r++) vec_write(TAG_ROW, r, 16'($urandom));
    for (int a = 0; a < 16; a++) begin
      vec_read(TAG_ROW, a); vec_read(TAG_COL, a);
    end
    vec_read(TAG_DIAG, 0); vec_read(TAG_ANTI, 0);

    // both sides at once, random mix
    for (int i = 0; i < 1500; i++) begin
      vec_tag_e t;
      int a;
      t = vec_tag_e'($urandom_range(0, 3));
      a = $urandom_range(0, 15);
      if ($urandom_range(0, 3) == 0) vec_write(t, a, 16'($urandom));
      else vec_read(t, a);
      case ($urandom_range(0, 4))
        0: ram_row(4'($urandom));
        1: ram_col(4'($urandom));
        2: ram_write(16'($urandom));
        3: ram_read();
        default: ram_rcde_off();
      endcase
    end

    for (int e = 0; e < EV_COUNT; e++) begin
      $display("mechanism %s seen %0d times", event_e'(e), seen[e]);
      checks++;
      if (seen[e] == 0) begin failures++; $display("mechanism %s never exercised", event_e'(e)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
