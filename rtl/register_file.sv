// register_file -- load, reuse and update registers of the Data Manager.
//
// The register file presents a core with a whole window of WIN data elements
// in a single cycle.  It is split in three registers:
//  * the load register collects, one per ld_valid, the elements that are not
//    already held (those new to the window);
//  * the reuse register holds the previous window, whose elements are reused;
//  * the update register is what the core sees: on commit it is assembled
//    from the reuse register shifted by the number of loaded elements, with the
//    loaded elements appended at the top.  Element 0 is the oldest.
// So a window that slides by S elements costs S loads and reuses WIN-S
// elements.  The split into load/reuse/update registers follows the memory
// system; the sliding-window organisation and the handshake are choices of
// this design.
//
// Interface: ld_valid/ld_data write the load register; commit (may coincide
// with the last ld_valid of a window, which is then included) builds the new
// window, setting win_valid in the next cycle.  win_valid stays high until
// the core takes the window with win_ready.  reused reports how many elements
// of the last committed window came from the reuse register.  clear empties
// the load register and forgets the previous window.
module register_file
  import pams_pkg::*;
#(
  parameter int unsigned WIN = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     ld_valid,
  input  word_t                    ld_data,
  input  logic                     commit,
  input  logic                     win_ready,
  output logic                     win_valid,
  output word_t                    win [WIN],
  output logic [$clog2(WIN+1)-1:0] reused
);

  localparam int unsigned CW = $clog2(WIN+1);

  word_t          load_q  [WIN];
  word_t          reuse_q [WIN];
  logic [CW-1:0]  ld_cnt;
  word_t          load_n  [WIN];
  logic [CW-1:0]  ld_n;
  word_t          next_win [WIN];

  // load register including this cycle's element
  always_comb begin
    load_n = load_q;
    ld_n   = ld_cnt;
    if (ld_valid && ld_cnt < CW'(WIN)) begin
      load_n[ld_cnt[$clog2(WIN > 1 ? WIN : 2)-1:0]] = ld_data;
      ld_n = ld_cnt + 1'b1;
    end
  end

  // window = reuse shifted down by ld_n, loaded elements on top
  always_comb begin
    for (int i = 0; i < int'(WIN); i++) begin
      if (i < int'(WIN) - int'(ld_n)) next_win[i] = reuse_q[i + int'(ld_n)];
      else                            next_win[i] = load_n[i - (int'(WIN) - int'(ld_n))];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(WIN); i++) begin
        load_q[i]  <= '0;
        reuse_q[i] <= '0;
        win[i]     <= '0;
      end
      ld_cnt    <= '0;
      win_valid <= 1'b0;
      reused    <= '0;
    end else if (clear) begin
      ld_cnt    <= '0;
      win_valid <= 1'b0;
    end else begin
      if (win_ready) win_valid <= 1'b0;
      if (commit) begin
        win       <= next_win;
        reuse_q   <= next_win;
        win_valid <= 1'b1;
        reused    <= CW'(WIN) - ld_n;
        ld_cnt    <= '0;
      end else begin
        load_q <= load_n;
        ld_cnt <= ld_n;
      end
    end
  end

endmodule
