// tb_pams_throughput -- read-after-write transfer workload on the whole
// memory system at its default sizes, with the SDRAM model.
//
// A data set is copied from one SDRAM area to another through the
// scratchpad: each transfer is a load descriptor (SDRAM -> scratchpad)
// followed by a store descriptor (scratchpad -> SDRAM) of the same block.
// Two transfer types are run: short windows of 32 words (128 bytes) and long
// windows of 1024 words (4 KB).  The data set is 16K words (64 KB) per type,
// a slice of the multi-megabyte sets such transfers are normally timed with;
// the per-transfer behaviour does not depend on the set size.  The
// descriptors are written over the program line before each batch, so that
// the timed part is only the memory system's own work.
//
// Checked: every copied word arrives at its destination (compared with the
// SDRAM model's initial contents of the source); no SDRAM protocol or timing
// error; cycles per word of the loads, of the stores and overall stay within
// bounds worked out from the design's timing (a unit-stride load streams one
// word per cycle after one activate and the read latency; a store moves one
// word per two cycles).  The measured rates are printed.
module tb_pams_throughput;
  import pams_pkg::*;
  localparam int WIN   = 8;
  localparam int TOTAL = 16384;      // words per transfer type
  localparam int OVH   = 20;         // fixed cycles allowed per transfer
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic prog_en = 0, req_valid = 0, req_ready;
  didx_t prog_idx = '0, req_idx = '0, done_idx;
  descriptor_t prog_desc = '0;
  logic rt_select = 0, rt_last = 0, rt_ready, rt_start;
  maddr_t rt_addr = '0;
  laddr_t rt_local_base = '0;
  logic [PRIO_W-1:0] rt_prio = '0;
  logic done_valid, done_irr, hist_clear = 0, sched_auto = 0;
  maddr_t cfg_ds_base = '0;
  logic [SIZE_W-1:0] cfg_ds_width = '0, cfg_ds_height = '0, cfg_ds_depth = '0, tile_x = '0, tile_y = '0, tile_z = '0;
  laddr_t cfg_sp_base = '0;
  logic tile_start = 0, tile_busy, tile_done;
  dir_e tile_dir = DIR_LOAD;
  logic [31:0] tile_rows;
  logic dm_start = 0, dm_busy, dm_done, win_valid, win_ready = 0;
  laddr_t dm_local_base = '0;
  logic [SIZE_W-1:0] dm_n_win = '0;
  logic [$clog2(WIN+1)-1:0] dm_step = '0, win_reused;
  word_t win [WIN];
  logic core_wr_en = 0;
  laddr_t core_wr_addr = '0;
  word_t core_wr_data = '0;
  sdram_cmd_e sd_cmd;
  logic [BANK_BITS-1:0] sd_bank;
  logic [ROW_BITS-1:0] sd_row;
  logic [COL_BITS-1:0] sd_col;
  word_t sd_wdata, sd_rdata;
  logic sd_rvalid, multi_bank;
  logic [31:0] row_hits, activates, precharges, n_transfers, n_reused, dm_loads, dm_reuses;
  logic [3:0] hist_entries;
  int errors, n_reads, n_writes;
  int checks = 0, failures = 0;

  pams_top dut (.*);
  sdram_model u_mem (.clk, .sd_cmd, .sd_bank, .sd_row, .sd_col, .sd_wdata,
                     .sd_rvalid, .sd_rdata, .errors, .n_reads, .n_writes);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_done = 0;
  always @(posedge clk) if (rst_n && done_valid) n_done++;

  function automatic descriptor_t mk(maddr_t m, int sz, int l, dir_e d);
    descriptor_t x = '0;
    x.main_addr = m; x.stride = 1; x.size = SIZE_W'(sz); x.local_addr = laddr_t'(l); x.dir = d;
    return x;
  endfunction

  task automatic prog_desc_wr(input int i, input descriptor_t d);
    @(negedge clk); prog_en = 1; prog_idx = didx_t'(i); prog_desc = d;
    @(negedge clk); prog_en = 0;
  endtask

  // one request, timed from its acceptance to its done pulse
  task automatic run(input int i, output longint cyc);
    int target = n_done + 1;
    @(negedge clk); req_valid = 1; req_idx = didx_t'(i);
    @(negedge clk); req_valid = 0; cyc = 1;
    while (n_done < target && cyc < 50000) begin @(negedge clk); cyc++; end
  endtask

  // copy TOTAL words from src to dst in transfers of sz words
  task automatic copy(input int sz, input maddr_t src, input maddr_t dst,
                      output longint ld_cyc, output longint st_cyc);
    int per_batch = 32;             // 32 load + 32 store descriptors
    int n = TOTAL / sz;
    ld_cyc = 0; st_cyc = 0;
    for (int b = 0; b < n; b += per_batch) begin
      for (int j = 0; j < per_batch && b + j < n; j++) begin
        automatic int k = b + j;
        automatic int l = (k * sz) % 32768;
        prog_desc_wr(2 * j,     mk(src + maddr_t'(k * sz), sz, l, DIR_LOAD));
        prog_desc_wr(2 * j + 1, mk(dst + maddr_t'(k * sz), sz, l, DIR_STORE));
      end
      for (int j = 0; j < per_batch && b + j < n; j++) begin
        longint c;
        run(2 * j, c);     ld_cyc += c;
        run(2 * j + 1, c); st_cyc += c;
      end
    end
  endtask

  task automatic verify(input maddr_t src, input maddr_t dst, input string name);
    int bad = 0;
    for (int i = 0; i < TOTAL; i++)
      if (u_mem.peek(dst + maddr_t'(i)) != u_mem.init_word(src + maddr_t'(i))) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("%s: %0d words wrong at the destination", name, bad); end
  endtask

  initial begin
    longint sl, ss, ll, ls;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); hist_clear = 1; @(negedge clk); hist_clear = 0;

    copy(32,   32'h0010_0000, 32'h0020_0000, sl, ss);
    verify(32'h0010_0000, 32'h0020_0000, "short windows");
    copy(1024, 32'h0030_0000, 32'h0040_0000, ll, ls);
    verify(32'h0030_0000, 32'h0040_0000, "long windows");

    $display("short windows (32 words): load %0.2f, store %0.2f, total %0.2f cycles/word",
             real'(sl) / TOTAL, real'(ss) / TOTAL, real'(sl + ss) / TOTAL);
    $display("long windows (1024 words): load %0.2f, store %0.2f, total %0.2f cycles/word",
             real'(ll) / TOTAL, real'(ls) / TOTAL, real'(ll + ls) / TOTAL);
    // bounds per transfer: a load takes its size plus at most OVH cycles
    // (scheduling, precharge and activate, read latency, queue); a store two
    // cycles per word plus at most OVH
    checks++;
    if (ll > longint'(TOTAL + TOTAL / 1024 * OVH) || ls > longint'(2 * TOTAL + TOTAL / 1024 * OVH)) begin
      failures++; $display("long-window rate below bound");
    end
    checks++;
    if (sl > longint'(TOTAL + TOTAL / 32 * OVH) || ss > longint'(2 * TOTAL + TOTAL / 32 * OVH)) begin
      failures++; $display("short-window rate below bound");
    end
    checks++;
    if (sl <= ll) begin failures++; $display("short windows not slower per word than long ones"); end
    checks++;
    if (errors != 0) begin failures++; $display("%0d SDRAM protocol errors", errors); end
    checks++;
    if (n_transfers != 2 * (TOTAL / 32 + TOTAL / 1024)) begin
      failures++; $display("%0d transfers", n_transfers);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
