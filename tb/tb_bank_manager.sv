// tb_bank_manager -- sends random read/write accesses in both bank modes to
// the bank manager connected to the SDRAM model.  A reference of main memory
// kept in the testbench checks every read value; the model flags any SDRAM
// protocol or timing error.  A model of the open rows kept in the testbench
// predicts, per access, whether it is a row hit, and the hit, activate and
// precharge counters are compared with it.  A second part streams a
// row-stride pattern (every access a row miss, banks in turn) in multi-bank
// mode twice, without and with the next address given as lookahead: the
// lookahead run must return the same data, keep the protocol and take at
// least a third fewer cycles.
module tb_bank_manager;
  import pams_pkg::*;
  localparam int NB = 1 << BANK_BITS;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic multi_bank = 0, req_valid = 0, req_we = 0, req_ready, nxt_valid = 0;
  maddr_t nxt_addr = '0;
  maddr_t req_addr = '0;
  word_t req_wdata = '0, sd_wdata, sd_rdata;
  sdram_cmd_e sd_cmd;
  logic [BANK_BITS-1:0] sd_bank;
  logic [ROW_BITS-1:0] sd_row;
  logic [COL_BITS-1:0] sd_col;
  logic sd_rvalid;
  logic [31:0] hits, activates, precharges;
  int errors, n_reads, n_writes;
  int checks = 0, failures = 0;

  bank_manager dut (.*);
  sdram_model u_mem (.clk, .sd_cmd, .sd_bank, .sd_row, .sd_col, .sd_wdata,
                     .sd_rvalid, .sd_rdata, .errors, .n_reads, .n_writes);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t exp_q [$];
  word_t refm [maddr_t];
  always @(posedge clk) if (sd_rvalid) begin
    checks++;
    if (exp_q.size() == 0 || sd_rdata != exp_q[0]) begin failures++; $display("read data %h wrong", sd_rdata); end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  initial begin
    bit o [NB]; int orow [NB];
    int e_hit = 0, e_act = 0, e_pre = 0, mh = 0;
    for (int i = 0; i < NB; i++) begin o[i] = 0; orow[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      maddr_t a; brc_t b; bit others;
      multi_bank = (n / 300) % 2;
      // addresses from a few rows of every bank so that hits are common
      a = maddr_t'({$urandom_range(0, 2), 3'($urandom_range(0, NB - 1)), 10'($urandom)});
      b = split_addr(a);
      others = 0;
      for (int i = 0; i < NB; i++) if (o[i] && i != int'(b.bank)) others = 1;
      if (o[b.bank] && orow[b.bank] == int'(b.row) && (multi_bank || !others)) e_hit++;
      else begin
        if (multi_bank) begin if (o[b.bank]) e_pre++; end
        else if (others || o[b.bank]) begin e_pre++; for (int i = 0; i < NB; i++) o[i] = 0; end
        o[b.bank] = 1; orow[b.bank] = int'(b.row); e_act++;
      end
      if (multi_bank && o[b.bank]) mh++;
      @(negedge clk);
      req_valid = 1; req_addr = a; req_we = $urandom_range(0, 2) == 0; req_wdata = $urandom;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      if (req_we) refm[a] = req_wdata;
      else exp_q.push_back(refm.exists(a) ? refm[a] : u_mem.init_word(a));
      @(negedge clk); req_valid = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (errors != 0) begin failures++; $display("%0d protocol errors", errors); end
    checks++;
    if (int'(hits) != e_hit || int'(activates) != e_act || int'(precharges) != e_pre) begin
      failures++; $display("hits %0d activates %0d/%0d precharges %0d/%0d", hits, activates, e_act, precharges, e_pre);
    end
    $display("row-hit accesses %0d of 3000", e_hit);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d reads not returned", exp_q.size()); end
    begin
      longint cyc [2];
      multi_bank = 1;
      for (int la = 0; la < 2; la++) begin
        automatic maddr_t base = maddr_t'(32'h0010_0000 + la * 32'h0004_0000);
        cyc[la] = 0;
        for (int i = 0; i < 64; i++) begin
          automatic maddr_t ad = base + maddr_t'(i * 1024);
          @(negedge clk);
          req_valid = 1; req_addr = ad; req_we = 0;
          nxt_valid = la == 1 && i != 63; nxt_addr = ad + 1024;
          @(posedge clk); cyc[la]++;
          while (!req_ready) begin @(posedge clk); cyc[la]++; end
          exp_q.push_back(refm.exists(ad) ? refm[ad] : u_mem.init_word(ad));
        end
        @(negedge clk); req_valid = 0; nxt_valid = 0;
        repeat (10) @(negedge clk);
      end
      $display("row-stride stream: %0d cycles without lookahead, %0d with", cyc[0], cyc[1]);
      checks++;
      if (cyc[1] * 3 > cyc[0] * 2 || errors != 0 || exp_q.size() != 0) begin
        failures++; $display("lookahead: %0d errors, %0d reads missing", errors, exp_q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
