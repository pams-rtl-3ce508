// tb_pams_stencil -- Laplacian (5-point stencil) kernel on the whole memory
// system at its default sizes, with the SDRAM model.
//
// The image is 128 x 128 words in SDRAM (row pitch 128).  One tile of 32 x 32
// results needs a 34 x 34 block of input (one element of halo on each side).
// The block is described by 34 row descriptors (Size 34, Stride 1), linked
// into one chain through their Offset fields, written over the program line
// and started with a single request; the rows land one after another in the
// scratchpad.  The core then reads the rows back as sliding windows of 8
// elements (step 1): for each result row it runs a window job over the row
// above, the row itself and the row below, and takes elements 0..2 of each
// window, computes 4*c - l - r - u - d, and writes the results into the
// scratchpad while the windows stream.  A second chain of 32 store
// descriptors (row pitch 128) writes the result tile back to SDRAM.
//
// Checked: every result word in SDRAM against the stencil computed from the
// model's initial image; one done per chain; 34 + 32 transfers; no SDRAM
// protocol error; the window jobs deliver one window per cycle (their
// elements reused from the previous window) whenever the core is not
// writing.
module tb_pams_stencil;
  import pams_pkg::*;
  localparam int WIN   = 8;
  localparam int PITCH = 128;          // image row pitch, words
  localparam int T     = 32;           // result tile edge
  localparam int B     = T + 2;        // input block edge with halo
  localparam maddr_t IMG = 32'h0050_0000;
  localparam maddr_t OUT = 32'h0060_0000;
  localparam int R0 = 40, C0 = 64;     // tile origin inside the image
  localparam int RES = 32'h4000;       // scratchpad base of the results
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_done = 0;
  always @(posedge clk) if (rst_n && done_valid) n_done++;

  function automatic word_t pix(int r, int c);
    return u_mem.init_word(IMG + maddr_t'(r * PITCH + c));
  endfunction

  task automatic prog_desc_wr(input int i, input descriptor_t d);
    @(negedge clk); prog_en = 1; prog_idx = didx_t'(i); prog_desc = d;
    @(negedge clk); prog_en = 0;
  endtask

  task automatic run_chain(input int head);
    int target = n_done + 1, t = 0;
    @(negedge clk); req_valid = 1; req_idx = didx_t'(head);
    @(negedge clk); req_valid = 0;
    while (n_done < target && t < 20000) begin @(negedge clk); t++; end
    checks++;
    if (n_done != target) begin failures++; $display("chain at %0d did not finish", head); end
  endtask

  // one window job over a block row; element k of row[] is window k, item 0..2
  int gaps = 0;
  task automatic row_job(input int brow, output word_t l [T], output word_t m [T], output word_t r [T],
                         input int res_row, input word_t res [T], input bit write_res);
    int k = 0, cyc = 0, last = -1, w = 0;
    @(negedge clk);
    dm_local_base = laddr_t'(brow * B); dm_n_win = SIZE_W'(T); dm_step = 1; dm_start = 1;
    @(negedge clk); dm_start = 0; win_ready = 1;
    while (!dm_done && cyc < 2000) begin
      // results of the previous row go into the scratchpad through the
      // core write port on every fourth cycle (each write stalls the reads)
      core_wr_en = write_res && (cyc % 4 == 3) && w < T;
      if (core_wr_en) begin
        core_wr_addr = laddr_t'(RES + res_row * T + w); core_wr_data = res[w]; w++;
      end
      #1;
      if (win_valid && k < T) begin
        l[k] = win[0]; m[k] = win[1]; r[k] = win[2];
        if (!write_res && last >= 0 && cyc - last != 1) gaps++;
        last = cyc; k++;
      end
      @(negedge clk); cyc++;
    end
    core_wr_en = 0; win_ready = 0;
    // finish the result writes the job did not leave room for
    while (write_res && w < T) begin
      core_wr_en = 1; core_wr_addr = laddr_t'(RES + res_row * T + w); core_wr_data = res[w]; w++;
      @(negedge clk);
    end
    core_wr_en = 0;
  endtask

  initial begin
    word_t up [T], mid [T], dn [T], a [T], b [T], c [T], res [T], prev [T];
    automatic int bad = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); hist_clear = 1; @(negedge clk); hist_clear = 0;

    // input block: 34 linked row descriptors, one request
    for (int i = 0; i < B; i++) begin
      automatic descriptor_t d = '0;
      d.main_addr = IMG + maddr_t'((R0 - 1 + i) * PITCH + C0 - 1);
      d.stride = 1; d.size = SIZE_W'(B); d.local_addr = laddr_t'(i * B);
      d.dir = DIR_LOAD; d.link = (i != B - 1); d.offset = didx_t'(i + 1);
      prog_desc_wr(i, d);
    end
    run_chain(0);

    // stencil, one result row per pass; results of row i-1 are written
    // during the jobs of row i
    for (int i = 0; i <= T; i++) begin
      if (i < T) begin
        row_job(i,     a, up,  b, i - 1, prev, i > 0);
        row_job(i + 1, a, mid, c, 0, prev, 0);
        for (int j = 0; j < T; j++) res[j] = 4 * mid[j] - a[j] - c[j];
        row_job(i + 2, a, dn,  b, 0, prev, 0);
        for (int j = 0; j < T; j++) res[j] = res[j] - up[j] - dn[j];
        prev = res;
      end else begin
        row_job(0, a, b, c, T - 1, prev, 1);
      end
    end
    checks++;
    if (gaps != 0) begin failures++; $display("%0d window rate gaps", gaps); end

    // result tile: 32 linked store descriptors
    for (int i = 0; i < T; i++) begin
      automatic descriptor_t d = '0;
      d.main_addr = OUT + maddr_t'((R0 + i) * PITCH + C0);
      d.stride = 1; d.size = SIZE_W'(T); d.local_addr = laddr_t'(RES + i * T);
      d.dir = DIR_STORE; d.link = (i != T - 1); d.offset = didx_t'(40 + i + 1);
      prog_desc_wr(40 + i, d);
    end
    run_chain(40);

    for (int i = 0; i < T; i++)
      for (int j = 0; j < T; j++) begin
        automatic int rr = R0 + i, cc = C0 + j;
        automatic word_t e = 4 * pix(rr, cc) - pix(rr, cc - 1) - pix(rr, cc + 1)
                             - pix(rr - 1, cc) - pix(rr + 1, cc);
        if (u_mem.peek(OUT + maddr_t'(rr * PITCH + cc)) != e) bad++;
      end
    checks++;
    if (bad != 0) begin failures++; $display("%0d of %0d result words wrong", bad, T * T); end
    checks++;
    if (n_transfers != B + T) begin failures++; $display("%0d transfers, expected %0d", n_transfers, B + T); end
    checks++;
    if (errors != 0) begin failures++; $display("%0d SDRAM protocol errors", errors); end
    $display("stencil tile %0dx%0d: %0d windows reused %0d elements", T, T, 3 * T * T, dm_reuses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
