// data_manager -- feeds a core with sliding windows out of the scratchpad.
//
// Given a job (local_base, n_win windows of WIN elements, each window S =
// step elements further than the one before), the data manager reads the
// scratchpad through its core-side port and fills the register file: the
// first window needs WIN loads, every later one only `step` loads because the
// other WIN-step elements are reused.  Window k holds the scratchpad words
// local_base + k*step ... local_base + k*step + WIN - 1.  The core receives a
// complete window in one cycle (win_valid/win_ready).
//
// Reads are issued one per cycle unless `stall` is set (the core is writing
// the scratchpad port that cycle) and never run past the end of the window
// that has not been committed yet.  With the core always ready and step = 1,
// a new window is delivered every cycle once the first one is out.  done
// pulses when the last window has been taken.  loads and reuses count the
// scratchpad reads made and the elements reused during the job.
// Reusing data between consecutive windows through a register file follows
// the memory system; the job format and the sequencing are this design's.
module data_manager
  import pams_pkg::*;
#(
  parameter int unsigned WIN = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // job
  input  logic                     start,
  input  laddr_t                   local_base,
  input  logic [SIZE_W-1:0]        n_win,
  input  logic [$clog2(WIN+1)-1:0] step,     // 1 .. WIN
  output logic                     busy,
  output logic                     done,
  // scratchpad core-side port (read only here)
  output logic                     spm_en,
  output laddr_t                   spm_addr,
  input  word_t                    spm_rdata,
  input  logic                     stall,
  // window to the core
  output logic                     win_valid,
  output word_t                    win [WIN],
  input  logic                     win_ready,
  // statistics
  output logic [31:0]              loads,
  output logic [31:0]              reuses,
  output logic [$clog2(WIN+1)-1:0] win_reused  // reused elements of the current window
);

  localparam int unsigned CW = $clog2(WIN+1);

  logic [31:0]       e_issue;     // next element to read
  logic [31:0]       boundary;    // last element of the window being loaded
  logic [31:0]       total;       // number of elements in the job
  logic [SIZE_W-1:0] committed;   // windows committed
  logic [CW-1:0]     step_q;
  laddr_t            base_q;
  logic [CW-1:0]     g_need, g_recv;
  logic              rd_pend;     // a read was issued last cycle
  logic              commit, issue, free, boundary_hit;

  assign free         = !win_valid || win_ready;
  assign boundary_hit = busy && (committed != n_win) &&
                        ((g_recv + CW'(rd_pend)) == g_need);
  assign commit       = boundary_hit && free;
  assign issue        = busy && !stall && (e_issue < total) &&
                        ((e_issue <= boundary) || (commit && e_issue <= boundary + 32'(step_q)));
  assign spm_en       = issue;
  assign spm_addr     = laddr_t'(32'(base_q) + e_issue);

  register_file #(.WIN(WIN)) u_rf (
    .clk, .rst_n,
    .clear    (start),
    .ld_valid (rd_pend),
    .ld_data  (spm_rdata),
    .commit   (commit),
    .win_ready(win_ready),
    .win_valid(win_valid),
    .win      (win),
    .reused   (win_reused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      e_issue   <= '0;
      boundary  <= '0;
      total     <= '0;
      committed <= '0;
      step_q    <= '0;
      base_q    <= '0;
      g_need    <= '0;
      g_recv    <= '0;
      rd_pend   <= 1'b0;
      loads     <= '0;
      reuses    <= '0;
    end else begin
      done    <= 1'b0;
      rd_pend <= issue;
      if (start && !busy) begin
        busy      <= (n_win != 0);
        e_issue   <= '0;
        boundary  <= 32'(WIN) - 1;
        total     <= (n_win == 0) ? '0 : 32'(WIN) + (32'(n_win) - 1) * 32'(step);
        committed <= '0;
        step_q    <= step;
        base_q    <= local_base;
        g_need    <= CW'(WIN);
        g_recv    <= '0;
      end else if (busy) begin
        if (issue) begin
          e_issue <= e_issue + 1;
          loads   <= loads + 1;
        end
        if (commit) begin
          committed <= committed + 1'b1;
          boundary  <= boundary + 32'(step_q);
          g_need    <= step_q;
          g_recv    <= '0;
          reuses    <= reuses + 32'(CW'(WIN) - g_need);
        end else if (rd_pend) begin
          g_recv <= g_recv + 1'b1;
        end
        if (committed == n_win && free) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
