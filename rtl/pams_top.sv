// pams_top -- Pattern Aware Memory System (PAMS).
//
// PAMS sits between processing cores and a shared SDRAM main memory and moves
// data in whole access patterns instead of single addresses.  Patterns are
// described by descriptors (local address, main address, priority, size,
// stride, offset):
//  * static patterns are written by a core into the regular descriptor memory
//    over the program line (prog_*) and started by index (req_*);
//  * addresses a core can only produce at run time go to the Address Manager
//    over the select/ready port (rt_*), which turns constant-stride runs into a
//    chain of linked descriptors in the irregular descriptor memory and starts
//    the chain itself.
// The Memory Manager schedules the requests (by priority, or shortest transfer
// first when sched_auto is set), skips loads already
// in the scratchpad (descriptor history table) and hands each descriptor to
// the Pattern Aware Main Memory Controller, which generates the addresses,
// manages SDRAM banks and rows in single- or multi-bank mode and moves the
// pattern between SDRAM and the 3D scratchpad (port A).  On the core side
// (port B) the Data Manager serves sliding windows out of the scratchpad
// through the load/reuse/update register file, a whole window per cycle
// (dm_*, win_*), and the core can write results into the scratchpad
// (core_wr_*, which stalls the data manager for that cycle); a store
// descriptor then writes them back to SDRAM.
// A 3D data set in main memory (cfg_ds_*) is moved one scratchpad-sized tile
// at a time by the tile unit (tile_*), which expands a tile into its row
// transfers and shares the controller with the Memory Manager (the Memory
// Manager goes first when both want to start); a tile load empties the
// history table, since it overwrites the scratchpad.
//
// The block structure follows the memory system as described; the handshakes,
// widths, the sharing rule of the controller and the job format of the data
// manager are this design's choices and
// are documented in each block.  The SDRAM itself and the cores are outside:
// the sd_* ports are an SDRAM command interface (ACT/RD/WR/PRE/PREA) with read
// data returned in order.
//
// All flops reset asynchronously on rst_n.  The two assertions below also
// read rst_n, in their disable condition, which lint tools may report as a
// reset used both synchronously and asynchronously; no flop does so.
module pams_top
  import pams_pkg::*;
#(
  parameter int unsigned SCRATCHPAD_WIDTH  = 32,
  parameter int unsigned SCRATCHPAD_HEIGHT = 32,
  parameter int unsigned SCRATCHPAD_BLOCKS = 64,
  parameter int unsigned WIN               = 8,
  parameter int unsigned T_RCD             = 3,
  parameter int unsigned T_RP              = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // program line: regular descriptor memory
  input  logic                     prog_en,
  input  didx_t                    prog_idx,
  input  descriptor_t              prog_desc,
  // static pattern requests
  input  logic                     req_valid,
  input  didx_t                    req_idx,
  output logic                     req_ready,
  // run-time addresses (Address Manager)
  input  logic                     rt_select,
  input  maddr_t                   rt_addr,
  input  logic                     rt_last,
  output logic                     rt_ready,
  input  laddr_t                   rt_local_base,
  input  logic [PRIO_W-1:0]        rt_prio,
  output logic                     rt_start,
  // pattern completion
  output logic                     done_valid,
  output didx_t                    done_idx,
  output logic                     done_irr,
  input  logic                     hist_clear,
  input  logic                     sched_auto,   // 0: by priority, 1: shortest first
  // 3D data set and tile transfers
  input  maddr_t                   cfg_ds_base,
  input  logic [SIZE_W-1:0]        cfg_ds_width,
  input  logic [SIZE_W-1:0]        cfg_ds_height,
  input  logic [SIZE_W-1:0]        cfg_ds_depth,
  input  laddr_t                   cfg_sp_base,
  input  logic                     tile_start,
  input  logic [SIZE_W-1:0]        tile_x,
  input  logic [SIZE_W-1:0]        tile_y,
  input  logic [SIZE_W-1:0]        tile_z,
  input  dir_e                     tile_dir,
  output logic                     tile_busy,
  output logic                     tile_done,
  output logic [31:0]              tile_rows,
  // data manager and register file
  input  logic                     dm_start,
  input  laddr_t                   dm_local_base,
  input  logic [SIZE_W-1:0]        dm_n_win,
  input  logic [$clog2(WIN+1)-1:0] dm_step,
  output logic                     dm_busy,
  output logic                     dm_done,
  output logic                     win_valid,
  output word_t                    win [WIN],
  input  logic                     win_ready,
  // core writes into the scratchpad
  input  logic                     core_wr_en,
  input  laddr_t                   core_wr_addr,
  input  word_t                    core_wr_data,
  // SDRAM command interface
  output sdram_cmd_e               sd_cmd,
  output logic [BANK_BITS-1:0]     sd_bank,
  output logic [ROW_BITS-1:0]      sd_row,
  output logic [COL_BITS-1:0]      sd_col,
  output word_t                    sd_wdata,
  input  logic                     sd_rvalid,
  input  word_t                    sd_rdata,
  // status and statistics
  output logic                     multi_bank,
  output logic [31:0]              row_hits,
  output logic [31:0]              activates,
  output logic [31:0]              precharges,
  output logic [31:0]              n_transfers,
  output logic [31:0]              n_reused,
  output logic [3:0]               hist_entries,
  output logic [31:0]              dm_loads,
  output logic [31:0]              dm_reuses,
  output logic [$clog2(WIN+1)-1:0] win_reused
);

  // descriptor memories
  didx_t       reg_rd_idx, irr_rd_idx, am_wr_idx, am_head;
  descriptor_t reg_rd_desc, irr_rd_desc, am_wr_desc;
  logic        am_wr_en, am_chain;

  descriptor_memory u_reg_dmem (
    .clk, .rst_n, .wr_en(prog_en), .wr_idx(prog_idx), .wr_desc(prog_desc),
    .rd_idx(reg_rd_idx), .rd_desc(reg_rd_desc));

  descriptor_memory u_irr_dmem (
    .clk, .rst_n, .wr_en(am_wr_en), .wr_idx(am_wr_idx), .wr_desc(am_wr_desc),
    .rd_idx(irr_rd_idx), .rd_desc(irr_rd_desc));

  address_manager u_am (
    .clk, .rst_n,
    .select(rt_select), .addr(rt_addr), .addr_last(rt_last), .ready(rt_ready),
    .cfg_local_base(rt_local_base), .cfg_prio(rt_prio),
    .dwr_en(am_wr_en), .dwr_idx(am_wr_idx), .dwr_desc(am_wr_desc),
    .chain_valid(am_chain), .chain_head(am_head), .start_seen(rt_start));

  // memory manager, tile unit and the main memory controller they share:
  // the memory manager has precedence, the owner of the running transfer
  // gets its done
  logic        mc_start, mc_done, mc_busy, irr_ready;
  descriptor_t mc_desc;
  logic        mm_start, mm_done, tl_req, tl_grant, tl_done_row, owner_tl;
  descriptor_t mm_desc, tl_desc;
  logic        hist_clr;

  assign tl_grant    = !mc_busy && !mm_start;
  assign mc_start    = mm_start || (tl_req && tl_grant);
  assign mc_desc     = mm_start ? mm_desc : tl_desc;
  assign mm_done     = mc_done && !owner_tl;
  assign tl_done_row = mc_done && owner_tl;
  // a tile load overwrites the scratchpad behind the history table's back
  assign hist_clr    = hist_clear ||
                       (tl_desc.dir == DIR_LOAD && ((tl_req && tl_grant) || tl_done_row));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        owner_tl <= 1'b0;
    else if (mc_start) owner_tl <= !mm_start;

  auto_tiler #(.SP_W(SCRATCHPAD_WIDTH), .SP_H(SCRATCHPAD_HEIGHT), .SP_B(SCRATCHPAD_BLOCKS)) u_tiler (
    .clk, .rst_n,
    .cfg_ds_base, .cfg_ds_width, .cfg_ds_height, .cfg_ds_depth, .cfg_sp_base,
    .start(tile_start), .tile_x, .tile_y, .tile_z, .dir(tile_dir),
    .busy(tile_busy), .done(tile_done),
    .mc_req(tl_req), .mc_desc(tl_desc), .mc_grant(tl_grant), .mc_done(tl_done_row),
    .rows(tile_rows));

  memory_manager u_mm (
    .clk, .rst_n,
    .reg_req_valid(req_valid), .reg_req_idx(req_idx), .reg_req_ready(req_ready),
    .irr_req_valid(am_chain), .irr_req_idx(am_head), .irr_req_ready(irr_ready),
    .reg_rd_idx, .reg_rd_desc, .irr_rd_idx, .irr_rd_desc,
    .mc_start(mm_start), .mc_desc(mm_desc), .mc_grant(!mc_busy), .mc_done(mm_done),
    .done_valid, .done_idx, .done_irr, .hist_clear(hist_clr), .sched_auto,
    .n_transfers, .n_reused, .hist_entries);

  logic   spa_en, spa_we;
  laddr_t spa_addr;
  word_t  spa_wdata, spa_rdata;

  pammc #(.T_RCD(T_RCD), .T_RP(T_RP)) u_pammc (
    .clk, .rst_n,
    .start(mc_start), .desc(mc_desc), .busy(mc_busy), .done(mc_done), .multi_bank,
    .spa_en, .spa_we, .spa_addr, .spa_wdata, .spa_rdata,
    .sd_cmd, .sd_bank, .sd_row, .sd_col, .sd_wdata, .sd_rvalid, .sd_rdata,
    .row_hits, .activates, .precharges);

  // the request buffer of the memory manager always has room for a chain, and
  // the controller is only started when idle
  a_chain_taken: assert property (@(posedge clk) disable iff (!rst_n) am_chain |-> irr_ready);
  a_mc_idle:     assert property (@(posedge clk) disable iff (!rst_n) mc_start |-> !mc_busy);

  // scratchpad: port A main-memory side, port B core side
  logic   dm_spm_en;
  laddr_t dm_spm_addr;
  word_t  spb_rdata;

  scratchpad_memory #(
    .SCRATCHPAD_WIDTH (SCRATCHPAD_WIDTH),
    .SCRATCHPAD_HEIGHT(SCRATCHPAD_HEIGHT),
    .SCRATCHPAD_BLOCKS(SCRATCHPAD_BLOCKS)
  ) u_spm (
    .clk,
    .a_en(spa_en), .a_we(spa_we), .a_addr(spa_addr), .a_wdata(spa_wdata), .a_rdata(spa_rdata),
    .b_en(core_wr_en || dm_spm_en), .b_we(core_wr_en),
    .b_addr(core_wr_en ? core_wr_addr : dm_spm_addr),
    .b_wdata(core_wr_data), .b_rdata(spb_rdata));

  data_manager #(.WIN(WIN)) u_dm (
    .clk, .rst_n,
    .start(dm_start), .local_base(dm_local_base), .n_win(dm_n_win), .step(dm_step),
    .busy(dm_busy), .done(dm_done),
    .spm_en(dm_spm_en), .spm_addr(dm_spm_addr), .spm_rdata(spb_rdata), .stall(core_wr_en),
    .win_valid, .win, .win_ready,
    .loads(dm_loads), .reuses(dm_reuses), .win_reused);

endmodule
