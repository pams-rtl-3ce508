// tb_pams_top -- end-to-end test of the memory system at its default sizes
// (32 x 32 x 64 scratchpad, 8-element windows) with the SDRAM model.
//
// Sequence: program four static descriptors over the program line; start a
// unit-stride tile load and, while it runs, a one-row-stride load (multi-bank
// mode) and a lower-priority load, and check they are served by priority;
// read the tile back as sliding windows (whole window per cycle, reuse of
// the overlap) while the core writes other scratchpad words (stalls); send a
// run-time address stream with several stride changes to the Address Manager
// and check the descriptor chain it builds lands in the scratchpad; request a
// tile again (history reuse); let the core overwrite the tile and store it
// back to SDRAM; move a clipped tile of a 3D data set with the tile unit
// while a static load shares the controller with it.  Each mechanism is counted and a failure is counted for any
// that never happened.
module tb_pams_top;
  import pams_pkg::*;
  localparam int WIN = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic prog_en = 0, req_valid = 0, req_ready;
  didx_t prog_idx = '0, req_idx = '0, done_idx;
  descriptor_t prog_desc = '0;
  logic rt_select = 0, rt_last = 0, rt_ready, rt_start;
  maddr_t rt_addr = '0;
  laddr_t rt_local_base = 16'h8000;
  logic [PRIO_W-1:0] rt_prio = 4'd6;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int c_multi = 0, c_single = 0, c_rt_start = 0, c_stall = 0, c_win = 0;
  int c_prea = 0, c_pre = 0, c_share = 0;
  didx_t  done_log [$];
  bit     irr_log [$];
  maddr_t start_log [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.mc_start) begin
      start_log.push_back(dut.mc_desc.main_addr);
      // the controller latches its bank mode in the next cycle
    end
    if (dut.u_pammc.busy && dut.u_pammc.ag_valid && dut.u_pammc.bm_ready) begin
      if (multi_bank) c_multi++; else c_single++;
    end
    if (rt_start) c_rt_start++;
    if (tile_busy && dut.mm_start) c_share++;   // manager transfer inside a tile
    if (core_wr_en && dm_busy) c_stall++;
    if (sd_cmd == SD_PREA) c_prea++;
    if (sd_cmd == SD_PRE) c_pre++;
    if (done_valid) begin done_log.push_back(done_idx); irr_log.push_back(done_irr); end
  end

  function automatic descriptor_t mk(maddr_t m, int st, int sz, int l, int pr, dir_e d);
    descriptor_t x = '0;
    x.main_addr = m; x.stride = stride_t'(st); x.size = SIZE_W'(sz);
    x.local_addr = laddr_t'(l); x.prio = PRIO_W'(pr); x.dir = d;
    return x;
  endfunction

  task automatic prog_desc_wr(input int i, input descriptor_t d);
    @(negedge clk); prog_en = 1; prog_idx = didx_t'(i); prog_desc = d;
    @(negedge clk); prog_en = 0;
  endtask

  task automatic request(input int i);
    @(negedge clk); req_valid = 1; req_idx = didx_t'(i);
    @(negedge clk); req_valid = 0;
  endtask

  task automatic wait_done(input int n);
    int t = 0;
    while (done_log.size() < n && t < 20000) begin @(negedge clk); t++; end
  endtask

  // sliding windows over the scratchpad, compared with expected words
  task automatic windows(input int base, input int nw, input int st, input word_t exp_w [$],
                         input bit with_writes, input int wr_base);
    int k = 0, bad = 0, gaps = 0, last = -1, cyc = 0, w = 0;
    @(negedge clk);
    dm_local_base = laddr_t'(base); dm_n_win = SIZE_W'(nw); dm_step = 4'(st); dm_start = 1;
    @(negedge clk); dm_start = 0; win_ready = 1;
    while (!dm_done && cyc < 20000) begin
      core_wr_en = with_writes && (cyc % 5 == 2);
      if (core_wr_en) begin core_wr_addr = laddr_t'(wr_base + w); core_wr_data = word_t'(32'hC0DE_0000 + w); w++; end
      #1;
      if (win_valid) begin
        c_win++;
        for (int i = 0; i < WIN; i++) if (win[i] != exp_w[k * st + i]) bad++;
        if (!with_writes && last >= 0 && cyc - last != st) gaps++;
        last = cyc; k++;
      end
      @(negedge clk); cyc++;
    end
    core_wr_en = 0; win_ready = 0;
    checks++;
    if (k != nw || bad != 0 || gaps != 0) begin
      failures++; $display("windows at %0d: %0d of %0d windows, %0d bad elements, %0d rate gaps", base, k, nw, bad, gaps);
    end
  endtask

  initial begin
    word_t exp_w [$];
    maddr_t rt [$];
    int n0, r0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- static descriptors over the program line
    prog_desc_wr(0, mk(32'h0004_0000, 1,    1024, 0,    2, DIR_LOAD));   // tile, unit stride
    prog_desc_wr(1, mk(32'h0010_0000, 1024, 256,  4096, 3, DIR_LOAD));   // one-row stride
    prog_desc_wr(2, mk(32'h0002_0000, 7,    128,  8192, 9, DIR_LOAD));   // highest priority
    prog_desc_wr(3, mk(32'h0050_0000, 1,    1024, 0,    1, DIR_STORE));  // tile back to SDRAM

    // ---- priority: 0 starts alone, 1 and 2 queue behind it, 2 goes first
    request(0); request(1); request(2);
    wait_done(3);
    checks++;
    if (start_log.size() != 3 || start_log[0] != 32'h0004_0000 || start_log[1] != 32'h0002_0000 ||
        start_log[2] != 32'h0010_0000) begin
      failures++; $display("static transfers out of priority order");
    end
    checks++;
    if (done_log.size() != 3 || done_log[0] != 0 || done_log[1] != 2 || done_log[2] != 1) begin
      failures++; $display("done order wrong");
    end

    // ---- sliding windows over the tile (step 1: a window per cycle)
    exp_w.delete();
    for (int i = 0; i < 1024; i++) exp_w.push_back(u_mem.init_word(32'h0004_0000 + maddr_t'(i)));
    r0 = dm_reuses;
    windows(0, 1024 - WIN + 1, 1, exp_w, 0, 0);
    checks++;
    if (dm_reuses - r0 != (1024 - WIN) * (WIN - 1)) begin failures++; $display("reuse count %0d", dm_reuses - r0); end
    // strided pattern, landed densely; read with step 4 while the core writes elsewhere
    exp_w.delete();
    for (int i = 0; i < 256; i++) exp_w.push_back(u_mem.init_word(32'h0010_0000 + maddr_t'(i * 1024)));
    windows(4096, (256 - WIN) / 4 + 1, 4, exp_w, 1, 20000);
    exp_w.delete();
    for (int i = 0; i < 128; i++) exp_w.push_back(u_mem.init_word(32'h0002_0000 + maddr_t'(i * 7)));
    windows(8192, 128 - WIN + 1, 1, exp_w, 0, 0);

    // ---- run-time addresses: runs of stride 1, 5, 3000 and single jumps
    rt.delete();
    for (int i = 0; i < 40; i++) rt.push_back(32'h0030_0000 + maddr_t'(i));
    for (int i = 0; i < 25; i++) rt.push_back(32'h0031_0000 + maddr_t'(i * 5));
    rt.push_back(32'h0000_7777);
    for (int i = 0; i < 30; i++) rt.push_back(32'h0040_0000 + maddr_t'(i * 3000));
    for (int i = 0; i < rt.size(); i++) begin
      @(negedge clk); rt_select = 1; rt_addr = rt[i]; rt_last = (i == rt.size() - 1);
      @(posedge clk); while (!rt_ready) @(posedge clk);
    end
    @(negedge clk); rt_select = 0; rt_last = 0;
    wait_done(4);
    checks++;
    if (done_log.size() < 4 || !irr_log[3]) begin failures++; $display("run-time chain not completed"); end
    exp_w.delete();
    foreach (rt[i]) exp_w.push_back(u_mem.init_word(rt[i]));
    windows(32'h8000, (rt.size() - WIN) / WIN + 1, WIN, exp_w, 0, 0);

    // ---- history reuse: tile requested again, no transfer
    n0 = n_transfers; r0 = n_reused;
    request(0); wait_done(5);
    checks++;
    if (n_transfers != n0 || n_reused != r0 + 1) begin failures++; $display("repeated tile was transferred again"); end

    // ---- core overwrites the tile, store it back
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); core_wr_en = 1; core_wr_addr = laddr_t'(i); core_wr_data = word_t'(i * 13 + 5);
    end
    @(negedge clk); core_wr_en = 0;
    request(3); wait_done(6);
    begin
      automatic int bad = 0;
      for (int i = 0; i < 1024; i++) if (u_mem.peek(32'h0050_0000 + maddr_t'(i)) != word_t'(i * 13 + 5)) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("store back: %0d words wrong", bad); end
    end
    // after the store the tile's history entry is gone, and a reload transfers
    n0 = n_transfers;
    prog_desc_wr(4, mk(32'h0050_0000, 1, 1024, 0, 1, DIR_LOAD));
    request(4); wait_done(7);
    checks++;
    if (n_transfers != n0 + 1) begin failures++; $display("reload did not transfer"); end

    // ---- tile unit: tile (1,0,0) of a 40 x 8 x 2 data set is clipped to
    // 8 x 8 x 2 (16 rows); a static load requested meanwhile shares the
    // controller with it; the tile load empties the history table
    cfg_ds_base = 32'h0300_0000; cfg_ds_width = 40; cfg_ds_height = 8; cfg_ds_depth = 2;
    cfg_sp_base = 16'h9000;
    prog_desc_wr(5, mk(32'h0006_0000, 1, 256, 16'hC000, 1, DIR_LOAD));
    n0 = n_transfers;
    @(negedge clk); tile_x = 1; tile_y = 0; tile_z = 0; tile_dir = DIR_LOAD; tile_start = 1;
    @(negedge clk); tile_start = 0;
    request(5);
    begin
      automatic int t = 0, bad = 0;
      while ((tile_busy || done_log.size() < 8) && t < 20000) begin @(negedge clk); t++; end
      for (int z = 0; z < 2; z++)
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++)
            if (dut.u_spm.mem[16'h9000 + z * 1024 + y * 32 + x] !=
                u_mem.init_word(32'h0300_0000 + maddr_t'((z * 8 + y) * 40 + 32 + x))) bad++;
      for (int i = 0; i < 256; i++)
        if (dut.u_spm.mem[16'hC000 + i] != u_mem.init_word(32'h0006_0000 + maddr_t'(i))) bad++;
      checks++;
      if (bad != 0 || tile_rows != 16 || done_log.size() != 8) begin
        failures++; $display("tile transfer: %0d words wrong, %0d rows", bad, tile_rows);
      end
    end
    request(4); wait_done(9);
    checks++;
    if (n_transfers != n0 + 2) begin failures++; $display("history not emptied by the tile load"); end

    // ---- mechanisms
    checks++; if (errors != 0) begin failures++; $display("%0d SDRAM protocol errors", errors); end
    $display("single-bank accesses %0d, multi-bank accesses %0d, row hits %0d, activates %0d, PRE %0d, PREA %0d",
             c_single, c_multi, row_hits, activates, c_pre, c_prea);
    $display("run-time stride changes %0d, core-write stalls %0d, windows %0d, reused elements %0d, history reuses %0d, shared starts %0d",
             c_rt_start, c_stall, c_win, dm_reuses, n_reused, c_share);
    checks++; if (c_single == 0)  begin failures++; $display("single-bank mode never used"); end
    checks++; if (c_multi == 0)   begin failures++; $display("multi-bank mode never used"); end
    checks++; if (row_hits == 0)  begin failures++; $display("no row hit"); end
    checks++; if (c_prea == 0 && c_pre == 0) begin failures++; $display("no precharge"); end
    checks++; if (c_rt_start < 3) begin failures++; $display("run-time stride changes %0d", c_rt_start); end
    checks++; if (c_stall == 0)   begin failures++; $display("data manager never stalled"); end
    checks++; if (dm_reuses == 0) begin failures++; $display("no register reuse"); end
    checks++; if (n_reused == 0)  begin failures++; $display("no history reuse"); end
    checks++; if (n_writes != 1024) begin failures++; $display("SDRAM writes %0d", n_writes); end
    checks++; if (c_share == 0)   begin failures++; $display("controller never shared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
