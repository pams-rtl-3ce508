// tb_address_manager -- sends request streams made of constant-stride runs
// (random run lengths and strides, including single-element runs) through
// the select/ready port, sometimes with select gaps, and compares every
// descriptor written to the irregular descriptor memory with a descriptor list
// the testbench computes itself from the same address stream: Main Address,
// Stride, Size, packed local addresses, the Offset/link chain and the head
// index reported with chain_valid.
module tb_address_manager;
  import pams_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic select = 0, addr_last = 0, ready;
  maddr_t addr = '0;
  laddr_t cfg_local_base = 16'h0100;
  logic [PRIO_W-1:0] cfg_prio = 4'd5;
  logic dwr_en, chain_valid, start_seen;
  didx_t dwr_idx, chain_head;
  descriptor_t dwr_desc;
  int checks = 0, failures = 0, starts = 0;

  address_manager dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && start_seen) starts++;

  // expected descriptors of the current stream
  maddr_t  e_main[$];
  stride_t e_stride[$];
  int      e_size[$];
  descriptor_t got[$];
  didx_t   got_idx[$];
  didx_t   head_seen;
  bit      head_got;

  always @(posedge clk) if (rst_n) begin
    if (dwr_en) begin got.push_back(dwr_desc); got_idx.push_back(dwr_idx); end
    if (chain_valid) begin head_seen = chain_head; head_got = 1; end
  end

  task automatic model(input maddr_t a[$]);
    bit known; stride_t s, cur; int sz; maddr_t m;
    e_main.delete(); e_stride.delete(); e_size.delete();
    m = a[0]; sz = 1; known = 0; cur = 0;
    for (int i = 1; i < a.size(); i++) begin
      s = stride_t'(a[i] - a[i-1]);
      if (!known) begin cur = s; known = 1; sz++; end
      else if (s == cur) sz++;
      else begin
        e_main.push_back(m); e_stride.push_back(cur); e_size.push_back(sz);
        m = a[i]; sz = 1; known = 0; cur = 0;
      end
    end
    e_main.push_back(m); e_stride.push_back(cur); e_size.push_back(sz);
  endtask

  task automatic send(input maddr_t a[$]);
    for (int i = 0; i < a.size(); i++) begin
      if ($urandom_range(0, 3) == 0) begin @(negedge clk); select = 0; end
      @(negedge clk);
      select = 1; addr = a[i]; addr_last = (i == a.size() - 1);
      @(posedge clk);
      while (!ready) @(posedge clk);
    end
    @(negedge clk); select = 0; addr_last = 0;
  endtask

  initial begin
    maddr_t a[$];
    didx_t expect_head;
    laddr_t lexp;
    expect_head = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int runs;
      maddr_t base;
      a.delete(); got.delete(); got_idx.delete(); head_got = 0;
      runs = $urandom_range(1, 4);
      base = maddr_t'($urandom_range(0, 1 << 20));
      for (int r = 0; r < runs; r++) begin
        int len; int st;
        len = $urandom_range(1, 6);
        st  = (r % 2 == 0) ? $urandom_range(1, 3) : 64 + r * 17 + t;
        for (int k = 0; k < len; k++) begin a.push_back(base); base = maddr_t'(int'(base) + st); end
        base = base + maddr_t'(1000 + r);
      end
      model(a);
      send(a);
      repeat (20) @(posedge clk);
      checks++;
      if (got.size() != e_main.size()) begin
        failures++; $display("stream %0d: %0d descriptors, expected %0d", t, got.size(), e_main.size());
      end else begin
        lexp = cfg_local_base;
        for (int i = 0; i < got.size(); i++) begin
          checks++;
          if (got[i].main_addr != e_main[i] || got[i].stride != e_stride[i] ||
              int'(got[i].size) != e_size[i] || got[i].local_addr != lexp ||
              got[i].prio != cfg_prio || got[i].link != (i != got.size() - 1) ||
              got_idx[i] != didx_t'(expect_head + didx_t'(i)) ||
              got[i].offset != didx_t'(got_idx[i] + 1'b1)) begin
            failures++;
            $display("stream %0d desc %0d: got main=%0h stride=%0d size=%0d local=%0h link=%0b idx=%0d",
                     t, i, got[i].main_addr, got[i].stride, got[i].size, got[i].local_addr, got[i].link, got_idx[i]);
            $display("   expected main=%0h stride=%0d size=%0d local=%0h", e_main[i], e_stride[i], e_size[i], lexp);
          end
          lexp = lexp + laddr_t'(e_size[i]);
        end
      end
      checks++;
      if (!head_got || head_seen != expect_head) begin failures++; $display("stream %0d: bad chain head", t); end
      expect_head = didx_t'(expect_head + didx_t'(e_main.size()));
    end
    checks++;
    if (starts == 0) begin failures++; $display("no start seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
