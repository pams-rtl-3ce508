// tb_memory_manager -- drives the memory manager with descriptor memories
// and a main memory controller modelled in the testbench (done a fixed 6
// cycles after start).  Checked: requests queued while busy are served in
// priority order; a repeated load is reused from the history table without a
// transfer; a store in between forces the reload; a chain of linked
// irregular descriptors is transferred in chain order; every request reports
// done with its index and source; with the automatic policy selected, queued
// requests are served shortest transfer first whatever their priority.
module tb_memory_manager;
  import pams_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic reg_req_valid = 0, irr_req_valid = 0, reg_req_ready, irr_req_ready;
  didx_t reg_req_idx = '0, irr_req_idx = '0, reg_rd_idx, irr_rd_idx, done_idx;
  descriptor_t reg_rd_desc, irr_rd_desc, mc_desc;
  logic mc_start, mc_done = 0, done_valid, done_irr, hist_clear = 0, sched_auto = 0, mc_grant = 1;
  logic [31:0] n_transfers, n_reused;
  logic [3:0] hist_entries;
  int checks = 0, failures = 0;

  descriptor_t regm [64], irrm [64];
  assign reg_rd_desc = regm[reg_rd_idx];
  assign irr_rd_desc = irrm[irr_rd_idx];

  memory_manager dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // controller model and transfer log
  maddr_t started [$];
  didx_t  done_log [$];
  bit     done_irr_log [$];
  int     mc_cnt = 0;
  always @(posedge clk) if (rst_n) begin
    mc_done <= 0;
    if (mc_start) begin started.push_back(mc_desc.main_addr); mc_cnt = 6; end
    else if (mc_cnt > 0) begin mc_cnt--; if (mc_cnt == 1) mc_done <= 1; end
    if (done_valid) begin done_log.push_back(done_idx); done_irr_log.push_back(done_irr); end
  end

  function automatic descriptor_t mk(maddr_t m, int pr, int l, dir_e d);
    descriptor_t x = '0;
    x.main_addr = m; x.prio = PRIO_W'(pr); x.size = 16; x.stride = 1; x.local_addr = laddr_t'(l); x.dir = d;
    return x;
  endfunction

  task automatic req_reg(input int i);
    @(negedge clk); reg_req_valid = 1; reg_req_idx = didx_t'(i); @(negedge clk); reg_req_valid = 0;
  endtask
  task automatic wait_idle(); repeat (60) @(negedge clk); endtask

  initial begin
    for (int i = 0; i < 64; i++) begin regm[i] = '0; irrm[i] = '0; end
    regm[0] = mk(32'h1000, 1, 0, DIR_LOAD);
    regm[1] = mk(32'h2000, 3, 100, DIR_LOAD);
    regm[2] = mk(32'h3000, 9, 200, DIR_LOAD);
    regm[3] = mk(32'h4000, 5, 300, DIR_LOAD);
    regm[4] = mk(32'h1000, 2, 0, DIR_STORE);
    irrm[10] = mk(32'hA000, 4, 400, DIR_LOAD); irrm[10].link = 1; irrm[10].offset = 11;
    irrm[11] = mk(32'hB000, 4, 416, DIR_LOAD); irrm[11].link = 1; irrm[11].offset = 12;
    irrm[12] = mk(32'hC000, 4, 432, DIR_LOAD);
    regm[5] = mk(32'h5000, 0, 500, DIR_LOAD); regm[5].size = 40;
    regm[6] = mk(32'h6000, 9, 600, DIR_LOAD); regm[6].size = 8;
    regm[7] = mk(32'h7000, 5, 700, DIR_LOAD); regm[7].size = 24;
    regm[8] = mk(32'h8000, 1, 800, DIR_LOAD); regm[8].size = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1) priority: request 0 runs first (alone), then 1,2,3 queue behind it
    req_reg(0); req_reg(1); req_reg(2); req_reg(3);
    wait_idle();
    checks++;
    if (started.size() != 4 || started[0] != 32'h1000 || started[1] != 32'h3000 ||
        started[2] != 32'h4000 || started[3] != 32'h2000) begin
      failures++; $display("priority order wrong:"); foreach (started[i]) $display("  %h", started[i]);
    end
    checks++;
    if (done_log.size() != 4 || done_log[1] != 2 || done_irr_log[1] != 0) begin failures++; $display("done log wrong"); end
    // 2) reuse from the history table
    started.delete();
    req_reg(2); wait_idle();
    checks++;
    if (started.size() != 0 || n_reused != 1) begin failures++; $display("repeated load not reused"); end
    // 3) a store over the same main area forces a reload
    req_reg(4); wait_idle();
    req_reg(0); wait_idle();
    checks++;
    if (started.size() != 2 || started[1] != 32'h1000) begin failures++; $display("reload after store missing"); end
    // 4) an irregular chain
    started.delete();
    @(negedge clk); irr_req_valid = 1; irr_req_idx = 10; @(negedge clk); irr_req_valid = 0;
    wait_idle();
    checks++;
    if (started.size() != 3 || started[0] != 32'hA000 || started[1] != 32'hB000 || started[2] != 32'hC000) begin
      failures++; $display("chain order wrong (%0d transfers)", started.size());
    end
    checks++;
    if (done_log[done_log.size()-1] != 10 || !done_irr_log[done_irr_log.size()-1]) begin failures++; $display("chain done wrong"); end
    // 5) the chain again: all three reused
    started.delete();
    @(negedge clk); irr_req_valid = 1; irr_req_idx = 10; @(negedge clk); irr_req_valid = 0;
    wait_idle();
    checks++;
    if (started.size() != 0 || n_reused != 4) begin failures++; $display("chain not reused (n_reused=%0d)", n_reused); end
    // 6) clearing the history forces transfers again
    @(negedge clk); hist_clear = 1; @(negedge clk); hist_clear = 0;
    req_reg(3); wait_idle();
    checks++;
    if (started.size() != 1 || hist_entries == 0) begin failures++; $display("clear did not force a transfer"); end
    checks++;
    if (n_transfers != 10) begin failures++; $display("n_transfers %0d", n_transfers); end
    // 7) automatic policy: 5 runs alone, then 8 (4 elements), 6 (8), 7 (24)
    started.delete();
    sched_auto = 1;
    req_reg(5); req_reg(6); req_reg(7); req_reg(8);
    wait_idle();
    checks++;
    if (started.size() != 4 || started[0] != 32'h5000 || started[1] != 32'h8000 ||
        started[2] != 32'h6000 || started[3] != 32'h7000) begin
      failures++; $display("automatic order wrong:"); foreach (started[i]) $display("  %h", started[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
