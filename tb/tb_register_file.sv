// tb_register_file -- loads random elements into the load register in groups
// of random size, commits (sometimes in the same cycle as the last load) and
// compares the update register with a sliding-window model kept in the
// testbench; also checks the reuse count and the win_valid/win_ready hold.
module tb_register_file;
  import pams_pkg::*;
  localparam int WIN = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic clear = 0, ld_valid = 0, commit = 0, win_ready = 0, win_valid;
  word_t ld_data = '0, win [WIN];
  logic [$clog2(WIN+1)-1:0] reused;
  int checks = 0, failures = 0;
  word_t model [$];

  register_file #(.WIN(WIN)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 300; g++) begin
      int n; bit same;
      n = (g % 40 == 0) ? WIN : $urandom_range(1, WIN);
      if (g % 40 == 0) begin
        @(negedge clk); clear = 1; @(negedge clk); clear = 0; model.delete();
        for (int i = 0; i < WIN; i++) model.push_back('0);
      end
      same = 1'($urandom_range(0, 1));
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        ld_valid = 1; ld_data = $urandom;
        model.push_back(ld_data); void'(model.pop_front());
        commit = same && (i == n - 1);
      end
      if (!same) begin @(negedge clk); ld_valid = 0; commit = 1; end
      @(negedge clk); ld_valid = 0; commit = 0;
      checks++;
      if (!win_valid) begin failures++; $display("no win_valid"); end
      for (int i = 0; i < WIN; i++) if (win[i] != model[i]) begin
        failures++; $display("group %0d elem %0d: %h expected %h", g, i, win[i], model[i]); break;
      end
      checks++;
      if (int'(reused) != WIN - n) begin failures++; $display("reused %0d expected %0d", reused, WIN - n); end
      @(negedge clk);
      checks++;
      if (!win_valid) begin failures++; $display("win_valid dropped without win_ready"); end
      win_ready = 1; @(negedge clk); win_ready = 0;
      checks++;
      if (win_valid) begin failures++; $display("win_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
