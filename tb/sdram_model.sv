// sdram_model -- behavioural model of the SDRAM main memory, for testbenches.
//
// Not synthesizable.  It accepts the command port of the bank manager
// (ACT, RD, WR, PRE, PREA, NOP), keeps the open row of every bank, returns
// read data CL cycles after a RD on rvalid/rdata, and stores written words in
// a sparse associative array.  A word never written reads as init_word(addr),
// a fixed function of its word address, so testbenches can predict it.
// Protocol errors are counted in `errors` and printed: ACT to an open bank,
// RD/WR to a closed bank, ACT earlier than T_RP after a precharge of that
// bank, RD/WR earlier than T_RCD after the ACT.
module sdram_model
  import pams_pkg::*;
#(
  parameter int unsigned CL    = 3,
  parameter int unsigned T_RCD = 3,
  parameter int unsigned T_RP  = 3
) (
  input  logic                 clk,
  input  sdram_cmd_e           sd_cmd,
  input  logic [BANK_BITS-1:0] sd_bank,
  input  logic [ROW_BITS-1:0]  sd_row,
  input  logic [COL_BITS-1:0]  sd_col,
  input  word_t                sd_wdata,
  output logic                 sd_rvalid,
  output word_t                sd_rdata,
  output int                   errors,
  output int                   n_reads,
  output int                   n_writes
);

  localparam int NB = 1 << BANK_BITS;

  word_t mem [maddr_t];
  bit    open_b [NB];
  logic [ROW_BITS-1:0] row_b [NB];
  longint t_act [NB], t_pre [NB];
  longint cyc = 0;
  bit    pipe_v [CL];
  word_t pipe_d [CL];

  function automatic word_t init_word(maddr_t a);
    return word_t'(a) ^ 32'h5A5A_0000;
  endfunction

  function automatic word_t peek(maddr_t a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  initial begin
    errors = 0; n_reads = 0; n_writes = 0;
    for (int i = 0; i < NB; i++) begin open_b[i] = 0; row_b[i] = '0; t_act[i] = -100; t_pre[i] = -100; end
    for (int i = 0; i < int'(CL); i++) pipe_v[i] = 0;
    sd_rvalid = 0; sd_rdata = '0;
  end

  always @(posedge clk) begin
    maddr_t a;
    bit v; word_t d;
    cyc++;
    v = 0; d = '0;
    a = maddr_t'({row_b[sd_bank], sd_bank, sd_col});
    case (sd_cmd)
      SD_ACT: begin
        if (open_b[sd_bank]) begin errors++; $display("sdram: ACT to open bank %0d", sd_bank); end
        if (cyc - t_pre[sd_bank] < longint'(T_RP)) begin errors++; $display("sdram: tRP violated bank %0d", sd_bank); end
        open_b[sd_bank] = 1; row_b[sd_bank] = sd_row; t_act[sd_bank] = cyc;
      end
      SD_RD, SD_WR: begin
        if (!open_b[sd_bank]) begin errors++; $display("sdram: access to closed bank %0d", sd_bank); end
        if (cyc - t_act[sd_bank] < longint'(T_RCD)) begin errors++; $display("sdram: tRCD violated bank %0d", sd_bank); end
        if (sd_cmd == SD_WR) begin mem[a] = sd_wdata; n_writes++; end
        else begin v = 1; d = peek(a); n_reads++; end
      end
      SD_PRE: begin open_b[sd_bank] = 0; t_pre[sd_bank] = cyc; end
      SD_PREA: for (int i = 0; i < NB; i++) begin open_b[i] = 0; t_pre[i] = cyc; end
      default: ;
    endcase
    sd_rvalid <= pipe_v[CL-1];
    sd_rdata  <= pipe_d[CL-1];
    for (int i = CL - 1; i > 0; i--) begin pipe_v[i] = pipe_v[i-1]; pipe_d[i] = pipe_d[i-1]; end
    pipe_v[0] = v; pipe_d[0] = d;
  end

endmodule
