// history_table -- descriptor history table of the Memory Manager.
//
// It remembers which main-memory patterns currently sit in the scratchpad, so
// that a pattern that was already loaded is reused instead of being fetched
// again.  Each entry holds a pattern's Main Address, Stride, Size and Local
// Address, plus the main-memory span [lo, hi] the pattern touches.
//
// Interface:
//  * lookup (combinational): lk_hit is set when a valid entry matches all four
//    of lk_main, lk_stride, lk_size and lk_local.
//  * update (one port, at the clock edge when upd_en is set):
//      upd_store = 0: a pattern has been loaded into the scratchpad.  Every
//        entry whose scratchpad area overlaps the new one is dropped (those
//        words were overwritten) and the pattern is written into the next
//        entry in round-robin order.
//      upd_store = 1: a pattern has been written to main memory.  Every entry
//        whose main-memory span overlaps the written span is dropped.
//    clear drops all entries.
// That the table exists and what it is for follows the memory system; its
// size (8 entries), the exact-match lookup, the round-robin replacement and
// the overlap rules are choices of this design.
module history_table
  import pams_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  maddr_t            lk_main,
  input  stride_t           lk_stride,
  input  logic [SIZE_W-1:0] lk_size,
  input  laddr_t            lk_local,
  output logic              lk_hit,
  input  logic              upd_en,
  input  logic              upd_store,
  input  maddr_t            upd_main,
  input  stride_t           upd_stride,
  input  logic [SIZE_W-1:0] upd_size,
  input  laddr_t            upd_local,
  output logic [$clog2(ENTRIES+1)-1:0] valid_count
);

  typedef struct packed {
    logic              valid;
    maddr_t            main_addr;
    stride_t           stride;
    logic [SIZE_W-1:0] size;
    laddr_t            local_addr;
    logic [MADDR_W:0]  lo;   // span in main memory, one extra bit for wrap
    logic [MADDR_W:0]  hi;
  } entry_t;

  entry_t tbl [ENTRIES];
  logic [$clog2(ENTRIES)-1:0] victim;

  // lookup
  always_comb begin
    lk_hit = 1'b0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (tbl[i].valid && tbl[i].main_addr == lk_main && tbl[i].stride == lk_stride &&
          tbl[i].size == lk_size && tbl[i].local_addr == lk_local)
        lk_hit = 1'b1;
    end
  end

  always_comb begin
    valid_count = '0;
    for (int i = 0; i < int'(ENTRIES); i++)
      valid_count = valid_count + ($clog2(ENTRIES+1))'(tbl[i].valid);
  end

  // span of the updating pattern
  logic signed [MADDR_W+SIZE_W+1:0] last_off;
  logic [MADDR_W:0] u_first, u_last, u_lo, u_hi;
  logic [LADDR_W:0] u_llo, u_lhi;

  always_comb begin
    last_off = $signed(upd_stride) * $signed({1'b0, upd_size - SIZE_W'(upd_size != 0)});
    u_first  = {1'b0, upd_main};
    u_last   = (MADDR_W+1)'($signed({1'b0, upd_main}) + last_off);
    u_lo     = (u_first <= u_last) ? u_first : u_last;
    u_hi     = (u_first <= u_last) ? u_last  : u_first;
    u_llo    = {1'b0, upd_local};
    u_lhi    = {1'b0, upd_local} + (LADDR_W+1)'(upd_size) - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) tbl[i] <= '0;
      victim <= '0;
    end else if (clear) begin
      for (int i = 0; i < int'(ENTRIES); i++) tbl[i].valid <= 1'b0;
    end else if (upd_en) begin
      for (int i = 0; i < int'(ENTRIES); i++) begin
        automatic logic [LADDR_W:0] e_llo = {1'b0, tbl[i].local_addr};
        automatic logic [LADDR_W:0] e_lhi = {1'b0, tbl[i].local_addr} + (LADDR_W+1)'(tbl[i].size) - 1'b1;
        if (upd_store) begin
          if (tbl[i].lo <= u_hi && u_lo <= tbl[i].hi) tbl[i].valid <= 1'b0;
        end else begin
          if (e_llo <= u_lhi && u_llo <= e_lhi) tbl[i].valid <= 1'b0;
        end
      end
      if (!upd_store) begin
        tbl[victim] <= '{valid: 1'b1, main_addr: upd_main, stride: upd_stride, size: upd_size,
                         local_addr: upd_local, lo: u_lo, hi: u_hi};
        victim <= victim + 1'b1;
      end
    end
  end

endmodule
