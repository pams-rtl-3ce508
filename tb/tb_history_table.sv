// tb_history_table -- random inserts, stores, lookups and clears against a
// reference table kept in the testbench with the same rules: exact-match
// lookup, round-robin replacement, a load drops entries whose scratchpad
// area it overlaps, a store drops entries whose main-memory span it overlaps.
module tb_history_table;
  import pams_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic clear = 0, lk_hit, upd_en = 0, upd_store = 0;
  maddr_t lk_main = '0, upd_main = '0;
  stride_t lk_stride = '0, upd_stride = '0;
  logic [SIZE_W-1:0] lk_size = '0, upd_size = '0;
  laddr_t lk_local = '0, upd_local = '0;
  logic [$clog2(N+1)-1:0] valid_count;
  int checks = 0, failures = 0;

  history_table #(.ENTRIES(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { bit v; longint m; longint s; int sz; int l; } ent_t;
  ent_t r [N];
  int vic = 0;

  function automatic longint lo_of(longint m, longint s, int sz);
    automatic longint e = m + s * longint'(sz - 1);
    return (e < m) ? e : m;
  endfunction
  function automatic longint hi_of(longint m, longint s, int sz);
    automatic longint e = m + s * longint'(sz - 1);
    return (e > m) ? e : m;
  endfunction

  // small address pools so that hits and overlaps are frequent
  function automatic maddr_t pm(); return maddr_t'(1000 + $urandom_range(0, 7) * 100); endfunction
  function automatic stride_t ps(); return stride_t'($urandom_range(0, 2) == 0 ? -4 : $urandom_range(1, 3)); endfunction
  function automatic int pz(); return $urandom_range(1, 40); endfunction
  function automatic laddr_t pl(); return laddr_t'($urandom_range(0, 7) * 32); endfunction

  initial begin
    automatic int hits = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) r[i].v = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic int op = $urandom_range(0, 9);
      @(negedge clk);
      if (op < 4) begin
        automatic bit exp = 0;
        lk_main = pm(); lk_stride = ps(); lk_size = SIZE_W'(pz()); lk_local = pl();
        if (n % 3 == 0) for (int i = 0; i < N; i++) if (r[i].v) begin
          lk_main = maddr_t'(r[i].m); lk_stride = stride_t'(r[i].s); lk_size = SIZE_W'(r[i].sz); lk_local = laddr_t'(r[i].l);
        end
        for (int i = 0; i < N; i++)
          if (r[i].v && r[i].m == longint'(lk_main) && r[i].s == longint'(lk_stride) &&
              r[i].sz == int'(lk_size) && r[i].l == int'(lk_local)) exp = 1;
        #1; checks++;
        if (lk_hit != exp) begin failures++; $display("n=%0d hit=%0b expected %0b", n, lk_hit, exp); end
        if (exp) hits++;
      end else if (op < 9) begin
        upd_en = 1; upd_store = (op == 8);
        upd_main = pm(); upd_stride = ps(); upd_size = SIZE_W'(pz()); upd_local = pl();
        for (int i = 0; i < N; i++) if (r[i].v) begin
          if (upd_store) begin
            if (lo_of(r[i].m, r[i].s, r[i].sz) <= hi_of(upd_main, upd_stride, upd_size) &&
                lo_of(upd_main, upd_stride, upd_size) <= hi_of(r[i].m, r[i].s, r[i].sz)) r[i].v = 0;
          end else if (r[i].l <= int'(upd_local) + int'(upd_size) - 1 && int'(upd_local) <= r[i].l + r[i].sz - 1)
            r[i].v = 0;
        end
        if (!upd_store) begin
          r[vic] = '{1, longint'(upd_main), longint'(upd_stride), int'(upd_size), int'(upd_local)};
          vic = (vic + 1) % N;
        end
        @(negedge clk); upd_en = 0;
      end else if (n % 7 == 0) begin
        clear = 1; for (int i = 0; i < N; i++) r[i].v = 0;
        @(negedge clk); clear = 0;
      end
      begin
        automatic int c = 0;
        for (int i = 0; i < N; i++) c += int'(r[i].v);
        checks++;
        if (int'(valid_count) != c) begin failures++; $display("n=%0d valid_count %0d expected %0d", n, valid_count, c); end
      end
    end
    checks++;
    if (hits == 0) begin failures++; $display("no hit exercised"); end
    $display("lookups that hit: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
