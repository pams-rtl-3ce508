// tb_descriptor_memory -- writes random descriptors to every entry and reads
// them back against a reference copy kept in the testbench; also checks that
// reset clears the contents and that a write only changes its own entry.
module tb_descriptor_memory;
  import pams_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic wr_en = 0;
  didx_t wr_idx = '0, rd_idx = '0;
  descriptor_t wr_desc = '0, rd_desc;
  descriptor_t ref_mem [64];
  int checks = 0, failures = 0;

  descriptor_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic descriptor_t rand_desc();
    descriptor_t d;
    d = descriptor_t'({$urandom, $urandom, $urandom, $urandom});
    return d;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      rd_idx = didx_t'(i); #1;
      checks++; if (rd_desc !== '0) begin failures++; $display("entry %0d not cleared", i); end
      ref_mem[i] = '0;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = didx_t'($urandom_range(0, 63)); wr_desc = rand_desc();
      ref_mem[wr_idx] = wr_desc;
      @(negedge clk);
      wr_en = 0;
      rd_idx = didx_t'($urandom_range(0, 63)); #1;
      checks++;
      if (rd_desc !== ref_mem[rd_idx]) begin
        failures++; $display("mismatch at %0d", rd_idx);
      end
    end
    for (int i = 0; i < 64; i++) begin
      rd_idx = didx_t'(i); #1;
      checks++; if (rd_desc !== ref_mem[i]) begin failures++; $display("final mismatch %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
