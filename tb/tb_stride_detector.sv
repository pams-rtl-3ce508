// tb_stride_detector -- feeds random address streams (with gaps and stream
// ends) and checks, one cycle later, the address, the stride to the previous
// address of the same stream and the first/last flags.
module tb_stride_detector;
  import pams_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic in_valid = 0, in_last = 0;
  maddr_t in_addr = '0;
  logic out_valid, out_first, out_last;
  maddr_t out_addr;
  stride_t out_stride;
  int checks = 0, failures = 0;

  stride_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    maddr_t prev; bit have; bit exp_first; stride_t exp_stride; bit v, l;
    have = 0; prev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      v = ($urandom_range(0, 4) != 0);
      l = ($urandom_range(0, 9) == 0);
      in_valid = v; in_last = l; in_addr = $urandom;
      if (v) begin
        exp_first  = !have;
        exp_stride = have ? stride_t'(in_addr - prev) : '0;
        prev = in_addr; have = !l;
      end
      @(negedge clk);
      checks++;
      if (out_valid != v) begin failures++; $display("valid mismatch"); end
      else if (v && (out_first != exp_first || out_last != l || out_addr != in_addr ||
                     (!exp_first && out_stride != exp_stride))) begin
        failures++;
        $display("n=%0d first=%0b/%0b stride=%0d/%0d", n, out_first, exp_first, out_stride, exp_stride);
      end
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("spurious valid"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
