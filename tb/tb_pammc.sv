// tb_pammc -- runs load and store descriptors through the main memory
// controller against the SDRAM model and a scratchpad model.  Loads with unit,
// small, negative, one-row and multi-row strides are checked word by word
// against the SDRAM model's known contents; stores are checked by reading the
// SDRAM model back.  Also checked: no SDRAM protocol error, both bank modes
// used, a unit-stride load activating one row and streaming one word per
// cycle (finishing within size + 12 cycles), and multi-bank mode keeping
// rows open for a stride of one row.
module tb_pammc;
  import pams_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic start = 0, busy, done, multi_bank;
  descriptor_t desc = '0;
  logic spa_en, spa_we;
  laddr_t spa_addr;
  word_t spa_wdata, spa_rdata;
  sdram_cmd_e sd_cmd;
  logic [BANK_BITS-1:0] sd_bank;
  logic [ROW_BITS-1:0] sd_row;
  logic [COL_BITS-1:0] sd_col;
  word_t sd_wdata, sd_rdata;
  logic sd_rvalid;
  logic [31:0] row_hits, activates, precharges;
  int errors, n_reads, n_writes;
  int checks = 0, failures = 0, single_runs = 0, multi_runs = 0;

  pammc dut (.*);
  sdram_model u_mem (.clk, .sd_cmd, .sd_bank, .sd_row, .sd_col, .sd_wdata,
                     .sd_rvalid, .sd_rdata, .errors, .n_reads, .n_writes);

  word_t spm [65536];
  always_ff @(posedge clk) if (spa_en) begin
    if (spa_we) spm[spa_addr] <= spa_wdata;
    spa_rdata <= spm[spa_addr];
  end

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input maddr_t m, input int st, input int sz, input int l, input dir_e d, output int cycles);
    int c = 0;
    @(negedge clk);
    desc = '0;
    desc.main_addr = m; desc.stride = stride_t'(st); desc.size = SIZE_W'(sz);
    desc.local_addr = laddr_t'(l); desc.dir = d;
    start = 1;
    @(negedge clk); start = 0;
    if (multi_bank) multi_runs++; else single_runs++;
    while (!done) begin @(negedge clk); c++; end
    cycles = c;
  endtask

  task automatic load_check(input maddr_t m, input int st, input int sz, input int l);
    int cyc, bad = 0;
    run(m, st, sz, l, DIR_LOAD, cyc);
    @(negedge clk);
    for (int i = 0; i < sz; i++)
      if (spm[16'(l + i)] != u_mem.peek(maddr_t'(int'(m) + i * st))) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("load m=%0h stride=%0d size=%0d: %0d words wrong", m, st, sz, bad); end
  endtask

  initial begin
    int cyc, h0, a0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // unit-stride streaming load: one activate, one word per cycle
    h0 = row_hits; a0 = activates;
    run(32'h0001_0000, 1, 256, 0, DIR_LOAD, cyc);
    checks++;
    if (activates - a0 != 1 || row_hits - h0 != 255) begin failures++; $display("unit stride: %0d activates %0d hits", activates - a0, row_hits - h0); end
    checks++;
    if (cyc > 256 + 12) begin failures++; $display("unit stride load took %0d cycles", cyc); end
    for (int i = 0; i < 256; i++) if (spm[i] != u_mem.peek(32'h0001_0000 + maddr_t'(i))) begin failures++; $display("unit load word %0d", i); break; end
    // one-row stride: multi-bank mode opens a row in each of the 8 banks; a
    // second pass over the same rows finds all of them still open
    a0 = activates;
    load_check(32'h0020_0000, 1 << COL_BITS, 8, 1000);
    checks++;
    if (activates - a0 != 8) begin failures++; $display("row stride: %0d activates, expected 8", activates - a0); end
    a0 = activates; h0 = row_hits;
    load_check(32'h0020_0005, 1 << COL_BITS, 8, 1100);
    checks++;
    if (activates - a0 != 0 || row_hits - h0 != 8) begin failures++; $display("row stride again: %0d activates", activates - a0); end
    // assorted loads
    load_check(32'h0000_0100, 3, 100, 2000);
    load_check(32'h0003_0000, -5, 77, 3000);
    load_check(32'h0100_0000, 8192, 20, 4000);
    load_check(32'h0000_1000, 1500, 50, 5000);
    load_check(32'h0000_2000, 1, 1, 6000);
    for (int t = 0; t < 20; t++)
      load_check(maddr_t'($urandom_range(0, 1 << 24)), $urandom_range(0, 1) ? $urandom_range(1, 9) : $urandom_range(1000, 20000),
                 $urandom_range(1, 120), $urandom_range(0, 60000));
    // stores
    for (int t = 0; t < 10; t++) begin
      int l = $urandom_range(0, 60000), sz = $urandom_range(1, 100);
      int st = (t % 2) ? $urandom_range(1, 4) : 2048;
      maddr_t m = maddr_t'($urandom_range(1 << 20, 1 << 22));
      int bad = 0;
      for (int i = 0; i < sz; i++) spm[16'(l + i)] = $urandom;
      run(m, st, sz, l, DIR_STORE, cyc);
      repeat (2) @(negedge clk);
      for (int i = 0; i < sz; i++) if (u_mem.peek(maddr_t'(int'(m) + i * st)) != spm[16'(l + i)]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("store %0d: %0d words wrong", t, bad); end
    end
    // a load of what was just stored comes back
    checks++;
    if (errors != 0) begin failures++; $display("%0d SDRAM protocol errors", errors); end
    checks++;
    if (single_runs == 0 || multi_runs == 0) begin failures++; $display("bank modes single=%0d multi=%0d", single_runs, multi_runs); end
    $display("single-bank runs %0d, multi-bank runs %0d, row hits %0d, activates %0d, precharges %0d",
             single_runs, multi_runs, row_hits, activates, precharges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
