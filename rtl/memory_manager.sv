// memory_manager -- schedules descriptor transfers between main memory and
// the scratchpad.
//
// Transfer requests name a descriptor: either one of the regular descriptor
// memory (a static pattern the core starts) or the head of a chain the
// Address Manager built in the irregular descriptor memory.  Requests are
// buffered per source and moved, one per cycle, into a small table of pending
// requests together with the Priority read from their descriptor.  When idle
// the manager picks a pending request and walks its descriptor chain.  Two
// scheduling policies are selectable at run time: the programmed policy
// (sched_auto = 0) picks the highest Priority, equal priorities going to the
// lowest table slot; the automatic policy (sched_auto = 1) ignores the
// programmed priorities and picks the request whose head descriptor moves the
// fewest elements (shortest transfer first, ties to the lowest slot), so that
// short requests are not held up behind long ones.  For each descriptor of
// the chain it first consults the descriptor history table; a load whose
// pattern is already in the scratchpad at the same local address is skipped
// (reused), any other descriptor is handed to the main memory controller and
// recorded in the history table when it completes.  A descriptor with its link
// bit set continues with the descriptor its Offset names, in the same memory.
// When the chain ends, done pulses with the request's index and source.
// Scheduling by priority, the history table and the linked descriptors follow
// the memory system, which also names programmed and automatic scheduling but
// does not define the automatic one; the shortest-transfer rule, the request
// buffering, the table size and the tie rule are choices of this design.
//
// Timing: a request enters the pending table the cycle after it is buffered
// (one per cycle); a descriptor that hits in the history table costs one
// cycle; otherwise the controller's start is issued in the first cycle in
// which mc_grant is high (the controller is shared with the tile unit).
module memory_manager
  import pams_pkg::*;
#(
  parameter int unsigned PENDING     = 4,
  parameter int unsigned HIST_ENTRIES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // requests
  input  logic        reg_req_valid,
  input  didx_t       reg_req_idx,
  output logic        reg_req_ready,
  input  logic        irr_req_valid,
  input  didx_t       irr_req_idx,
  output logic        irr_req_ready,
  // descriptor memories (combinational read)
  output didx_t       reg_rd_idx,
  input  descriptor_t reg_rd_desc,
  output didx_t       irr_rd_idx,
  input  descriptor_t irr_rd_desc,
  // main memory controller
  output logic        mc_start,
  output descriptor_t mc_desc,
  input  logic        mc_grant,     // the controller may be started this cycle
  input  logic        mc_done,
  // completion
  output logic        done_valid,
  output didx_t       done_idx,
  output logic        done_irr,
  input  logic        hist_clear,
  input  logic        sched_auto,   // 0: by priority, 1: shortest transfer first
  // statistics
  output logic [31:0] n_transfers,
  output logic [31:0] n_reused,
  output logic [$clog2(HIST_ENTRIES+1)-1:0] hist_entries
);

  // ---------------- request buffers ----------------
  logic  rq_empty, rq_full, iq_empty, iq_full, rq_pop, iq_pop;
  didx_t rq_head, iq_head;
  logic [3:0] rq_cnt, iq_cnt;   // occupancy, not needed by the sequencer

  sync_fifo #(.WIDTH(DIDX_W), .DEPTH(8)) u_rq (
    .clk, .rst_n, .push(reg_req_valid), .in_data(reg_req_idx), .pop(rq_pop),
    .out_data(rq_head), .empty(rq_empty), .full(rq_full), .count(rq_cnt));
  sync_fifo #(.WIDTH(DIDX_W), .DEPTH(8)) u_iq (
    .clk, .rst_n, .push(irr_req_valid), .in_data(irr_req_idx), .pop(iq_pop),
    .out_data(iq_head), .empty(iq_empty), .full(iq_full), .count(iq_cnt));

  assign reg_req_ready = !rq_full;
  assign irr_req_ready = !iq_full;

  // ---------------- pending table ----------------
  typedef struct packed {
    logic              valid;
    logic              irr;
    didx_t             idx;
    logic [PRIO_W-1:0] prio;
    logic [SIZE_W-1:0] size;
  } pend_t;

  pend_t pend [PENDING];
  logic  have_free, have_pend;
  logic [$clog2(PENDING)-1:0] free_slot, best_slot;

  always_comb begin
    have_free = 1'b0;
    free_slot = '0;
    for (int i = int'(PENDING) - 1; i >= 0; i--)
      if (!pend[i].valid) begin have_free = 1'b1; free_slot = ($clog2(PENDING))'(i); end
    have_pend = 1'b0;
    best_slot = '0;
    for (int i = 0; i < int'(PENDING); i++)
      if (pend[i].valid &&
          (!have_pend ||
           (!sched_auto && pend[i].prio > pend[best_slot].prio) ||
           ( sched_auto && pend[i].size < pend[best_slot].size))) begin
        have_pend = 1'b1;
        best_slot = ($clog2(PENDING))'(i);
      end
  end

  // ---------------- sequencer ----------------
  typedef enum logic [1:0] { S_IDLE, S_RUN, S_WAIT } state_e;
  state_e      state;
  logic        cur_irr;
  didx_t       cur_idx, req_idx;
  logic [$clog2(PENDING)-1:0] cur_slot;
  descriptor_t cur_desc, d_lat;
  logic        hist_hit;
  logic        ins_reg, ins_irr;

  assign ins_reg = (state == S_IDLE) && !rq_empty && have_free;
  assign ins_irr = (state == S_IDLE) && rq_empty && !iq_empty && have_free;
  assign rq_pop  = ins_reg;
  assign iq_pop  = ins_irr;

  assign reg_rd_idx = (state == S_IDLE) ? rq_head : cur_idx;
  assign irr_rd_idx = (state == S_IDLE) ? iq_head : cur_idx;
  assign cur_desc   = cur_irr ? irr_rd_desc : reg_rd_desc;

  history_table #(.ENTRIES(HIST_ENTRIES)) u_hist (
    .clk, .rst_n,
    .clear     (hist_clear),
    .lk_main   (cur_desc.main_addr),
    .lk_stride (cur_desc.stride),
    .lk_size   (cur_desc.size),
    .lk_local  (cur_desc.local_addr),
    .lk_hit    (hist_hit),
    .upd_en    (state == S_WAIT && mc_done),
    .upd_store (d_lat.dir == DIR_STORE),
    .upd_main  (d_lat.main_addr),
    .upd_stride(d_lat.stride),
    .upd_size  (d_lat.size),
    .upd_local (d_lat.local_addr),
    .valid_count(hist_entries)
  );

  logic mc_need;
  assign mc_need  = (state == S_RUN) && !(cur_desc.dir == DIR_LOAD && hist_hit);
  assign mc_start = mc_need && mc_grant;
  assign mc_desc  = cur_desc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(PENDING); i++) pend[i] <= '0;
      state       <= S_IDLE;
      cur_irr     <= 1'b0;
      cur_idx     <= '0;
      req_idx     <= '0;
      cur_slot    <= '0;
      d_lat       <= '0;
      done_valid  <= 1'b0;
      done_idx    <= '0;
      done_irr    <= 1'b0;
      n_transfers <= '0;
      n_reused    <= '0;
    end else begin
      done_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (ins_reg)
            pend[free_slot] <= '{valid: 1'b1, irr: 1'b0, idx: rq_head, prio: reg_rd_desc.prio,
                                size: reg_rd_desc.size};
          else if (ins_irr)
            pend[free_slot] <= '{valid: 1'b1, irr: 1'b1, idx: iq_head, prio: irr_rd_desc.prio,
                                size: irr_rd_desc.size};
          else if (have_pend) begin
            cur_slot <= best_slot;
            cur_irr  <= pend[best_slot].irr;
            cur_idx  <= pend[best_slot].idx;
            req_idx  <= pend[best_slot].idx;
            state    <= S_RUN;
          end
        end
        S_RUN: begin
          d_lat <= cur_desc;
          if (mc_need) begin
            if (mc_grant) begin
              n_transfers <= n_transfers + 1;
              state       <= S_WAIT;
            end
          end else begin
            n_reused <= n_reused + 1;
            if (cur_desc.link) cur_idx <= cur_desc.offset;
            else begin
              done_valid          <= 1'b1;
              done_idx            <= req_idx;
              done_irr            <= cur_irr;
              pend[cur_slot].valid <= 1'b0;
              state               <= S_IDLE;
            end
          end
        end
        S_WAIT: begin
          if (mc_done) begin
            if (d_lat.link) begin
              cur_idx <= d_lat.offset;
              state   <= S_RUN;
            end else begin
              done_valid          <= 1'b1;
              done_idx            <= req_idx;
              done_irr            <= cur_irr;
              pend[cur_slot].valid <= 1'b0;
              state               <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
