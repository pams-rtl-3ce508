// tb_pams_tile3d -- moves one full tile of a 128 x 128 x 128 word data set
// into the 32 x 32 x 64 scratchpad and back out, at the default sizes, with
// the tile unit and the SDRAM model.
//
// The data set geometry and the scratchpad geometry are those of the usual
// 3D example configuration; the data set sits at word address 0x0100_0000.
// Tile (1, 2, 1) covers x 32..63, y 64..95, z 64..127, i.e. 2048 rows of 32
// contiguous words.  The tile is loaded, every one of the 65536 scratchpad
// words is compared with the SDRAM model's initial contents, and the tile is
// then stored into the same place of a second data set at 0x0200_0000, whose
// 65536 words are checked in SDRAM.  Rows transferred (2048 each way), the
// absence of SDRAM protocol errors and the cycles per word (printed) are
// checked: a row costs its 32 words plus a fixed overhead of at most 20
// cycles for a load, 2 cycles per word plus 20 for a store.
module tb_pams_tile3d;
  import pams_pkg::*;
  localparam int WIN = 8;
  localparam int N = 128, TW = 32, TH = 32, TB = 64, OVH = 20;
  localparam maddr_t SRC = 32'h0100_0000, DST = 32'h0200_0000;
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
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tile(input maddr_t base, input dir_e d, output int cyc);
    @(negedge clk);
    cfg_ds_base = base; cfg_ds_width = N; cfg_ds_height = N; cfg_ds_depth = N; cfg_sp_base = '0;
    tile_x = 1; tile_y = 2; tile_z = 1; tile_dir = d; tile_start = 1;
    @(negedge clk); tile_start = 0; cyc = 1;
    while (!tile_done && cyc < 700000) begin @(negedge clk); cyc++; end
  endtask

  function automatic maddr_t elem(maddr_t base, int x, int y, int z);
    return base + maddr_t'(((TB + z) * N + 2 * TH + y) * N + TW + x);
  endfunction

  initial begin
    automatic int cl, cs, bad = 0, rows0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    tile(SRC, DIR_LOAD, cl);
    for (int z = 0; z < TB; z++)
      for (int y = 0; y < TH; y++)
        for (int x = 0; x < TW; x++)
          if (dut.u_spm.mem[z * TW * TH + y * TW + x] != u_mem.init_word(elem(SRC, x, y, z))) bad++;
    checks++;
    if (bad != 0 || tile_rows != TH * TB) begin
      failures++; $display("tile load: %0d words wrong, %0d rows", bad, tile_rows);
    end
    rows0 = tile_rows;
    tile(DST, DIR_STORE, cs);
    bad = 0;
    for (int z = 0; z < TB; z++)
      for (int y = 0; y < TH; y++)
        for (int x = 0; x < TW; x++)
          if (u_mem.peek(elem(DST, x, y, z)) != u_mem.init_word(elem(SRC, x, y, z))) bad++;
    checks++;
    if (bad != 0 || tile_rows - rows0 != TH * TB || n_writes != TW * TH * TB) begin
      failures++; $display("tile store: %0d words wrong, %0d rows, %0d writes", bad, tile_rows - rows0, n_writes);
    end
    $display("tile of %0d words: load %0.2f, store %0.2f cycles/word", TW * TH * TB,
             real'(cl) / (TW * TH * TB), real'(cs) / (TW * TH * TB));
    checks++;
    if (cl > TH * TB * (TW + OVH) || cs > TH * TB * (2 * TW + OVH)) begin
      failures++; $display("tile transfer slower than bound");
    end
    checks++;
    if (errors != 0) begin failures++; $display("%0d SDRAM protocol errors", errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
