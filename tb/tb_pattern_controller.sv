// tb_pattern_controller -- drives (address, stride, first, last) streams as the
// stride detector would present them and compares the closed descriptors
// (Main Address, Stride, Size, last flag) and the start pulses with a list
// the testbench computes itself.
module tb_pattern_controller;
  import pams_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic in_valid = 0, in_first = 0, in_last = 0;
  maddr_t in_addr = '0;
  stride_t in_stride = '0;
  logic desc_valid, desc_last, start;
  maddr_t desc_main;
  stride_t desc_stride;
  logic [SIZE_W-1:0] desc_size;
  int checks = 0, failures = 0, starts = 0, exp_starts = 0;

  pattern_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  maddr_t  e_main[$];
  stride_t e_stride[$];
  int      e_size[$];
  bit      e_last[$];

  always @(posedge clk) if (rst_n) begin
    if (start) starts++;
    if (desc_valid) begin
      checks++;
      if (e_main.size() == 0) begin failures++; $display("unexpected descriptor"); end
      else begin
        if (desc_main != e_main[0] || desc_stride != e_stride[0] ||
            int'(desc_size) != e_size[0] || desc_last != e_last[0]) begin
          failures++;
          $display("got %0h/%0d/%0d/%0b expected %0h/%0d/%0d/%0b", desc_main, desc_stride, desc_size,
                   desc_last, e_main[0], e_stride[0], e_size[0], e_last[0]);
        end
        void'(e_main.pop_front()); void'(e_stride.pop_front());
        void'(e_size.pop_front()); void'(e_last.pop_front());
      end
    end
  end

  initial begin
    maddr_t a[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      maddr_t base; bit known; stride_t cur, s; int sz; maddr_t m;
      a.delete();
      base = $urandom;
      for (int r = 0; r < $urandom_range(1, 5); r++) begin
        automatic int st = $urandom_range(0, 2) == 0 ? 1 : $urandom_range(2, 5000);
        for (int k = 0; k < $urandom_range(1, 7); k++) begin a.push_back(base); base += maddr_t'(st); end
        base += maddr_t'($urandom_range(1, 99));
      end
      // reference
      m = a[0]; sz = 1; known = 0; cur = 0;
      for (int i = 1; i < a.size(); i++) begin
        s = stride_t'(a[i] - a[i-1]);
        if (!known) begin cur = s; known = 1; sz++; end
        else if (s == cur) sz++;
        else begin
          e_main.push_back(m); e_stride.push_back(cur); e_size.push_back(sz); e_last.push_back(0);
          exp_starts++;
          m = a[i]; sz = 1; known = 0; cur = 0;
        end
      end
      e_main.push_back(m); e_stride.push_back(cur); e_size.push_back(sz); e_last.push_back(1);
      // drive
      for (int i = 0; i < a.size(); i++) begin
        @(negedge clk);
        in_valid = 1; in_addr = a[i]; in_first = (i == 0); in_last = (i == a.size() - 1);
        in_stride = (i == 0) ? '0 : stride_t'(a[i] - a[i-1]);
        if ($urandom_range(0, 2) == 0 && i != a.size() - 1) begin
          @(negedge clk); in_valid = 0;
        end
      end
      @(negedge clk); in_valid = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (e_main.size() != 0) begin failures++; $display("stream %0d: %0d descriptors missing", t, e_main.size()); e_main.delete(); e_stride.delete(); e_size.delete(); e_last.delete(); end
    end
    checks++;
    if (starts != exp_starts) begin failures++; $display("starts %0d expected %0d", starts, exp_starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
