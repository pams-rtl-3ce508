// tb_scratchpad_memory -- writes the full default 32 x 32 x 64 scratchpad
// through both ports with words derived from their address, reads every word
// back through the other port with the one-cycle read latency, then mixes
// random reads and writes on both ports against a reference array; also checks
// read-before-write on one port and port B winning a same-word write.
module tb_scratchpad_memory;
  import pams_pkg::*;
  localparam int WORDS = 32 * 32 * 64;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  laddr_t a_addr = '0, b_addr = '0;
  word_t a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  word_t refm [WORDS];
  int checks = 0, failures = 0;

  scratchpad_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pat(int a); return word_t'(a * 7 + 32'hA5A5_0000); endfunction

  initial begin
    // fill: even words through port A, odd words through port B
    for (int i = 0; i < WORDS; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = laddr_t'(i);     a_wdata = pat(i);
      b_en = 1; b_we = 1; b_addr = laddr_t'(i + 1); b_wdata = pat(i + 1);
      refm[i] = pat(i); refm[i+1] = pat(i + 1);
    end
    @(negedge clk); a_we = 0; b_we = 0;
    // read back through the other port
    for (int i = 0; i < WORDS; i += 2) begin
      @(negedge clk);
      a_addr = laddr_t'(i + 1); b_addr = laddr_t'(i);
      @(negedge clk);
      checks++;
      if (a_rdata != refm[i+1] || b_rdata != refm[i]) begin
        failures++; if (failures < 10) $display("readback %0d wrong", i);
      end
    end
    // random traffic
    for (int n = 0; n < 20000; n++) begin
      int aa, bb;
      @(negedge clk);
      aa = $urandom_range(0, WORDS - 1); bb = (n % 50 == 0) ? aa : $urandom_range(0, WORDS - 1);
      a_addr = laddr_t'(aa); b_addr = laddr_t'(bb);
      a_we = $urandom_range(0, 1) == 1; b_we = $urandom_range(0, 1) == 1;
      a_wdata = $urandom; b_wdata = $urandom;
      @(posedge clk); #1;
      checks++;
      if (a_rdata != refm[aa] || b_rdata != refm[bb]) begin
        failures++; if (failures < 10) $display("n=%0d read-before-write wrong", n);
      end
      if (a_we) refm[aa] = a_wdata;
      if (b_we) refm[bb] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); a_addr = laddr_t'(i);
      @(posedge clk); #1;
      checks++;
      if (a_rdata != refm[i]) begin failures++; if (failures < 10) $display("final %0d wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
