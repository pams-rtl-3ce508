// pammc -- Pattern Aware Main Memory Controller.
//
// Unlike a controller that serves one address at a time, the PAMMC takes a
// whole descriptor from the memory manager and moves the pattern it describes
// between main memory and the scratchpad.  The address generator expands
// (Main Address, Stride, Size) into word addresses; each address is split
// into SDRAM bank, row and column and handed to the bank manager, which keeps
// rows open and issues the SDRAM commands.  For a load the read data is
// collected in the column queue (row buffer) and written into the scratchpad
// from the descriptor's Local Address upwards, one word per element, so a
// strided or scattered pattern lands as a dense block.  For a store the
// words are read from the scratchpad in the same order and written to the
// generated addresses.
//
// Bank mode: unit and short strides run in single-bank mode; a pattern whose
// stride is at least one SDRAM row (2^COL_BITS words) runs in multi-bank mode,
// so that its long strides visit several banks whose rows stay open; the
// address after the current one (current + Stride) is passed to the bank
// manager so that its bank is opened while the current access waits.
// The descriptor-driven translation, the bank/row/column split and the two
// bank modes follow the controller as described; the mode threshold, the
// queue depth and the one-pattern-at-a-time operation (no per-bank queues
// serving several patterns in parallel) are choices of this design.
//
// Interface: start with desc while !busy; done pulses once the last word is in
// the scratchpad (load) or its write command has been issued (store).
// Scratchpad port A: spa_* (one-cycle read latency).  SDRAM: sd_* command
// port, sd_rvalid/sd_rdata returning read data in order.
module pammc
  import pams_pkg::*;
#(
  parameter int unsigned T_RCD   = 3,
  parameter int unsigned T_RP    = 3,
  parameter int unsigned Q_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  descriptor_t          desc,
  output logic                 busy,
  output logic                 done,
  output logic                 multi_bank,
  // scratchpad port A
  output logic                 spa_en,
  output logic                 spa_we,
  output laddr_t               spa_addr,
  output word_t                spa_wdata,
  input  word_t                spa_rdata,
  // SDRAM
  output sdram_cmd_e           sd_cmd,
  output logic [BANK_BITS-1:0] sd_bank,
  output logic [ROW_BITS-1:0]  sd_row,
  output logic [COL_BITS-1:0]  sd_col,
  output word_t                sd_wdata,
  input  logic                 sd_rvalid,
  input  word_t                sd_rdata,
  // statistics
  output logic [31:0]          row_hits,
  output logic [31:0]          activates,
  output logic [31:0]          precharges
);

  dir_e              dir_q;
  laddr_t            lbase_q;
  logic [SIZE_W-1:0] size_q, wr_cnt, st_cnt;
  logic              st_have;      // store: scratchpad word for st_cnt is on spa_rdata
  stride_t           stride_q;     // pattern stride, for the bank lookahead

  // address generator
  logic   ag_busy, ag_valid, ag_last, ag_ready, ag_ack;
  maddr_t ag_addr;

  pammc_addr_gen u_ag (
    .clk, .rst_n,
    .start    (start && !busy),
    .main_addr(desc.main_addr),
    .stride   (desc.stride),
    .stream   (desc.size),
    .busy     (ag_busy),
    .out_valid(ag_valid),
    .out_addr (ag_addr),
    .out_last (ag_last),
    .out_ready(ag_ready),
    .ack      (ag_ack)
  );

  // bank manager
  logic bm_valid, bm_ready;

  assign bm_valid = ag_valid && (dir_q == DIR_LOAD || st_have);
  assign ag_ready = bm_ready;

  bank_manager #(.T_RCD(T_RCD), .T_RP(T_RP)) u_bm (
    .clk, .rst_n,
    .multi_bank,
    .req_valid (bm_valid),
    .req_addr  (ag_addr),
    .req_we    (dir_q == DIR_STORE),
    .req_wdata (spa_rdata),
    .req_ready (bm_ready),
    .nxt_valid (ag_valid && !ag_last),
    .nxt_addr  (ag_addr + maddr_t'(stride_q)),
    .sd_cmd, .sd_bank, .sd_row, .sd_col, .sd_wdata,
    .hits      (row_hits),
    .activates,
    .precharges
  );

  // column queue / row buffer for read data
  logic  q_empty, q_full;
  word_t q_out;
  logic [$clog2(Q_DEPTH):0] q_count;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(Q_DEPTH)) u_colq (
    .clk, .rst_n,
    .push    (sd_rvalid),
    .in_data (sd_rdata),
    .pop     (!q_empty),
    .out_data(q_out),
    .empty   (q_empty),
    .full    (q_full),
    .count   (q_count)
  );

  // scratchpad port A: loads drain the queue, stores fetch the next word
  logic st_fetch;
  assign st_fetch = busy && dir_q == DIR_STORE && !st_have && ag_valid;

  always_comb begin
    spa_en    = 1'b0;
    spa_we    = 1'b0;
    spa_addr  = lbase_q + laddr_t'(wr_cnt);
    spa_wdata = q_out;
    if (!q_empty) begin
      spa_en = 1'b1;
      spa_we = 1'b1;
    end else if (st_fetch) begin
      spa_en   = 1'b1;
      spa_addr = lbase_q + laddr_t'(st_cnt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      multi_bank <= 1'b0;
      stride_q   <= '0;
      dir_q      <= DIR_LOAD;
      lbase_q    <= '0;
      size_q     <= '0;
      wr_cnt     <= '0;
      st_cnt     <= '0;
      st_have    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        automatic logic [MADDR_W-1:0] mag = desc.stride[MADDR_W-1] ? maddr_t'(-desc.stride)
                                                                   : maddr_t'(desc.stride);
        busy       <= 1'b1;
        dir_q      <= desc.dir;
        lbase_q    <= desc.local_addr;
        size_q     <= desc.size;
        wr_cnt     <= '0;
        st_cnt     <= '0;
        st_have    <= 1'b0;
        multi_bank <= (mag >= maddr_t'(1 << COL_BITS));
        stride_q   <= desc.stride;
      end else if (busy) begin
        if (!q_empty) wr_cnt <= wr_cnt + 1'b1;
        if (st_fetch && q_empty) st_have <= 1'b1;
        if (bm_valid && bm_ready && dir_q == DIR_STORE) begin
          st_have <= 1'b0;
          st_cnt  <= st_cnt + 1'b1;
        end
        if (dir_q == DIR_LOAD) begin
          if ((wr_cnt + SIZE_W'(!q_empty)) == size_q && !ag_busy && !ag_ack) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else if (!ag_busy && !ag_ack && !st_have) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
