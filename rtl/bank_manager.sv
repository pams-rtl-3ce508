// bank_manager -- SDRAM bank and row management of the main memory controller.
//
// Each access (a word address, split into row, bank and column) is turned into
// SDRAM commands.  Two modes, chosen per pattern with multi_bank:
//  * single-bank mode keeps one bank/row combination open.  An access to it
//    is a row hit and issues its read/write at once; any other access closes
//    everything (precharge all) and opens the new bank/row.
//  * multi-bank mode keeps a row open in every bank.  An access to a bank's
//    open row is a hit; otherwise only that bank is precharged (if open) and
//    activated.  Long-stride patterns that visit several banks thus find their
//    rows still open.  Banks work in parallel: each bank has its own timer,
//    and while the current access waits for its bank (T_RCD/T_RP) the manager
//    uses the free command slots to precharge/activate the bank of the next
//    access of the pattern (nxt_valid/nxt_addr, a one-access lookahead), so
//    the row misses of a long-stride pattern overlap across banks.
// The two modes, when they are used and the parallel use of banks follow the
// controller as described; the command set, the in-order sequencing of the
// accesses with a single access of lookahead, the timing parameters (T_RCD, T_RP in clock cycles, the CAS latency handled by the
// memory itself) and the absence of refresh are choices of this design.
//
// Interface: req_valid/req_ready with req_addr, req_we, req_wdata; an access
// is accepted in the cycle its RD/WR command is issued, so row hits go at one
// per cycle.  Read data comes back from the memory on sd_rvalid/sd_rdata in
// the order of the reads.  nxt_valid/nxt_addr name the access that will follow
// the current one (ignored in single-bank mode).  hits counts accesses that
// found their row open without any command issued for them (a row opened
// ahead does not count); activates and precharges count those commands.
module bank_manager
  import pams_pkg::*;
#(
  parameter int unsigned T_RCD = 3,
  parameter int unsigned T_RP  = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 multi_bank,
  input  logic                 req_valid,
  input  maddr_t               req_addr,
  input  logic                 req_we,
  input  word_t                req_wdata,
  output logic                 req_ready,
  input  logic                 nxt_valid,
  input  maddr_t               nxt_addr,
  // SDRAM command port
  output sdram_cmd_e           sd_cmd,
  output logic [BANK_BITS-1:0] sd_bank,
  output logic [ROW_BITS-1:0]  sd_row,
  output logic [COL_BITS-1:0]  sd_col,
  output word_t                sd_wdata,
  // statistics
  output logic [31:0]          hits,
  output logic [31:0]          activates,
  output logic [31:0]          precharges
);

  localparam int unsigned NB = 1 << BANK_BITS;

  logic [NB-1:0]       open_q;
  logic [ROW_BITS-1:0] orow_q [NB];
  logic [3:0]          wait_q [NB];  // per bank: cycles before its next command
  logic [NB-1:0]       ahead_q;      // row opened ahead for a later access
  brc_t                a, n, c;      // current access, next access, command target
  logic                hit, others_open, all_idle, nxt_prep;
  logic                missed_q;     // the pending access needed a PRE/ACT

  assign a = split_addr(req_addr);
  assign n = split_addr(nxt_addr);

  always_comb begin
    others_open = 1'b0;
    all_idle    = 1'b1;
    for (int i = 0; i < int'(NB); i++) begin
      if (open_q[i] && i != int'(a.bank)) others_open = 1'b1;
      if (wait_q[i] != 0) all_idle = 1'b0;
    end
    hit = open_q[a.bank] && (orow_q[a.bank] == a.row) && (multi_bank || !others_open);
    // the next access can be prepared in another, idle bank
    nxt_prep = multi_bank && nxt_valid && (n.bank != a.bank) && (wait_q[n.bank] == 0) &&
               !(open_q[n.bank] && orow_q[n.bank] == n.row);
  end

  always_comb begin
    sd_cmd    = SD_NOP;
    c         = a;
    sd_wdata  = req_wdata;
    req_ready = 1'b0;
    if (req_valid && wait_q[a.bank] == 0) begin
      if (hit) begin
        sd_cmd    = req_we ? SD_WR : SD_RD;
        req_ready = 1'b1;
      end else if (multi_bank) begin
        sd_cmd = open_q[a.bank] ? SD_PRE : SD_ACT;
      end else if (all_idle) begin
        sd_cmd = (open_q != '0) ? SD_PREA : SD_ACT;
      end
    end
    if (sd_cmd == SD_NOP && req_valid && nxt_prep) begin
      c      = n;
      sd_cmd = open_q[n.bank] ? SD_PRE : SD_ACT;
    end
    sd_bank = c.bank;
    sd_row  = c.row;
    sd_col  = c.col;
  end

  logic for_cur;   // the command serves the current access
  assign for_cur = (c.bank == a.bank);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q     <= '0;
      ahead_q    <= '0;
      for (int i = 0; i < int'(NB); i++) begin orow_q[i] <= '0; wait_q[i] <= '0; end
      missed_q   <= 1'b0;
      hits       <= '0;
      activates  <= '0;
      precharges <= '0;
    end else begin
      for (int i = 0; i < int'(NB); i++)
        if (wait_q[i] != 0) wait_q[i] <= wait_q[i] - 1'b1;
      unique case (sd_cmd)
        SD_ACT: begin
          open_q[c.bank]  <= 1'b1;
          orow_q[c.bank]  <= c.row;
          wait_q[c.bank]  <= 4'(T_RCD - 1);
          ahead_q[c.bank] <= !for_cur;
          activates       <= activates + 1;
          if (for_cur) missed_q <= 1'b1;
        end
        SD_PRE: begin
          open_q[c.bank]  <= 1'b0;
          wait_q[c.bank]  <= 4'(T_RP - 1);
          ahead_q[c.bank] <= 1'b0;
          precharges      <= precharges + 1;
          if (for_cur) missed_q <= 1'b1;
        end
        SD_PREA: begin
          open_q     <= '0;
          ahead_q    <= '0;
          for (int i = 0; i < int'(NB); i++) wait_q[i] <= 4'(T_RP - 1);
          precharges <= precharges + 1;
          missed_q   <= 1'b1;
        end
        SD_RD, SD_WR: begin
          if (!missed_q && !ahead_q[a.bank]) hits <= hits + 1;
          missed_q        <= 1'b0;
          ahead_q[a.bank] <= 1'b0;
        end
        default: ;
      endcase
    end
  end

endmodule
