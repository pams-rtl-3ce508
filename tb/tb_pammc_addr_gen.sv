// tb_pammc_addr_gen -- starts patterns with random base, stride (positive
// and negative) and stream length, takes addresses with a randomly stalling
// ready, and checks every address, the last flag, the number of addresses,
// the ack pulse and the one-address-per-cycle rate with ready held high.
module tb_pammc_addr_gen;
  import pams_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic start = 0, busy, out_valid, out_last, out_ready = 0, ack;
  maddr_t main_addr = '0, out_addr;
  stride_t stride = '0;
  logic [SIZE_W-1:0] stream = '0;
  int checks = 0, failures = 0;

  pammc_addr_gen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n, got, cyc; bit rnd, acked;
      n = (t % 25 == 0) ? 0 : $urandom_range(1, 60);
      rnd = (t % 2 == 1);
      @(negedge clk);
      main_addr = $urandom; stride = stride_t'($urandom_range(0, 1) ? $urandom_range(1, 5000) : -$urandom_range(1, 50));
      stream = SIZE_W'(n); start = 1;
      @(negedge clk); start = 0;
      got = 0; cyc = 0; acked = 0;
      while (!acked && cyc < 500) begin
        out_ready = !rnd || ($urandom_range(0, 2) != 0);
        #1;
        if (ack) acked = 1;
        if (out_valid && out_ready) begin
          checks++;
          if (out_addr != main_addr + maddr_t'(got * stride) || out_last != (got == n - 1)) begin
            failures++; $display("t=%0d element %0d: %h last=%0b", t, got, out_addr, out_last);
          end
          got++;
        end
        @(negedge clk); cyc++;
      end
      out_ready = 0;
      checks++;
      if (got != n || !acked) begin failures++; $display("t=%0d: %0d addresses of %0d, ack=%0b", t, got, n, acked); end
      if (!rnd && n > 0) begin
        checks++;
        if (cyc != n + 1) begin failures++; $display("t=%0d took %0d cycles for %0d", t, cyc, n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
