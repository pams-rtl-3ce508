// tb_data_manager -- runs sliding-window jobs with several steps over a
// scratchpad model whose word at address a is a known function of a, with a
// core that is sometimes not ready and a port that is sometimes stalled.
// Every window is compared element by element with the expected words, and
// the load/reuse counts and the delivery rate (one window per `step` cycles
// when nothing holds it back) are checked.
module tb_data_manager;
  import pams_pkg::*;
  localparam int WIN = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic start = 0, busy, done, spm_en, stall = 0, win_valid, win_ready = 0;
  laddr_t local_base = '0, spm_addr;
  logic [SIZE_W-1:0] n_win = '0;
  logic [$clog2(WIN+1)-1:0] step = '0, win_reused;
  word_t spm_rdata, win [WIN];
  logic [31:0] loads, reuses;
  int checks = 0, failures = 0;

  data_manager #(.WIN(WIN)) dut (.*);
  always #5 clk = ~clk;

  function automatic word_t f(input int a);
    return word_t'(a * 32'h9E37_79B9 + 32'h1234);
  endfunction

  always_ff @(posedge clk) if (spm_en) spm_rdata <= f(int'(spm_addr));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int k, last_t, cyc;
  bit random_mode;
  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  task automatic run(input int base, input int nw, input int st, input bit rnd);
    int l0, r0, t0;
    l0 = loads; r0 = reuses;
    random_mode = rnd;
    @(negedge clk);
    local_base = laddr_t'(base); n_win = SIZE_W'(nw); step = 4'(st); start = 1;
    @(negedge clk); start = 0;
    k = 0; last_t = -1;
    while (!done) begin
      @(negedge clk);
      stall     = rnd && ($urandom_range(0, 3) == 0);
      win_ready = !rnd || ($urandom_range(0, 2) != 0);
      if (win_valid && win_ready) begin
        checks++;
        for (int i = 0; i < WIN; i++)
          if (win[i] != f(base + k * st + i)) begin
            failures++; $display("job base=%0d step=%0d win %0d elem %0d wrong", base, st, k, i);
            break;
          end
        if (!rnd && k > 0) begin
          checks++;
          if (cyc - last_t != st) begin failures++; $display("window %0d after %0d cycles, expected %0d", k, cyc - last_t, st); end
        end
        last_t = cyc;
        k++;
      end
    end
    win_ready = 0; stall = 0;
    checks++;
    if (k != nw) begin failures++; $display("%0d windows, expected %0d", k, nw); end
    checks++;
    if (loads - l0 != WIN + (nw - 1) * st || reuses - r0 != (nw - 1) * (WIN - st)) begin
      failures++; $display("loads %0d reuses %0d", loads - l0, reuses - r0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(100, 20, 1, 0);
    run(5000, 10, 2, 0);
    run(0, 6, 8, 0);
    run(65000, 12, 3, 0);
    for (int j = 0; j < 30; j++) run($urandom_range(0, 60000), $urandom_range(1, 25), $urandom_range(1, WIN), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
