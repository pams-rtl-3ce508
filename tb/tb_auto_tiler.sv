// tb_auto_tiler -- drives the tile unit with a model of the main memory
// controller (grant at random, done 3..6 cycles after a start) and compares
// every descriptor it issues with the rows of the tile computed here from the
// data-set layout: main address (z*height + y)*width + x of the row start,
// Size = clipped width, Stride 1, scratchpad address base + z*W*H + y*W.
// Covered: a full interior tile, tiles clipped at the x, y and z edges of a
// data set that is not a multiple of the tile, a tile wholly outside (no
// transfer, immediate done), store direction, and the row counter.
module tb_auto_tiler;
  import pams_pkg::*;
  localparam int W = 4, H = 3, B = 2;   // small scratchpad for the test
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  maddr_t cfg_ds_base = '0;
  logic [SIZE_W-1:0] cfg_ds_width = '0, cfg_ds_height = '0, cfg_ds_depth = '0;
  laddr_t cfg_sp_base = '0;
  logic start = 0, busy, done, mc_req, mc_grant = 0, mc_done = 0;
  logic [SIZE_W-1:0] tile_x = '0, tile_y = '0, tile_z = '0;
  dir_e dir = DIR_LOAD;
  descriptor_t mc_desc;
  logic [31:0] rows;
  int checks = 0, failures = 0;

  auto_tiler #(.SP_W(W), .SP_H(H), .SP_B(B)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // controller model: random grant, done a few cycles after the start
  descriptor_t got [$];
  int cnt = 0;
  always @(posedge clk) if (rst_n) begin
    mc_done <= 0;
    if (mc_req && mc_grant) begin got.push_back(mc_desc); cnt = $urandom_range(3, 6); end
    else if (cnt > 0) begin cnt--; if (cnt == 0) mc_done <= 1; end
    mc_grant <= $urandom_range(0, 2) != 0;
  end

  task automatic tile(input int dw, input int dh, input int dd, input int tx, input int ty, input int tz,
                      input dir_e d);
    descriptor_t exp [$];
    int x0 = tx * W, y0 = ty * H, z0 = tz * B, t = 0, bad = 0;
    int w = (dw - x0 < W) ? dw - x0 : W;
    int h = (dh - y0 < H) ? dh - y0 : H;
    int n = (dd - z0 < B) ? dd - z0 : B;
    int rows0 = rows;
    if (w > 0 && h > 0 && n > 0)
      for (int z = 0; z < n; z++)
        for (int y = 0; y < h; y++) begin
          automatic descriptor_t e = '0;
          e.main_addr  = cfg_ds_base + maddr_t'(((z0 + z) * dh + y0 + y) * dw + x0);
          e.local_addr = cfg_sp_base + laddr_t'(z * W * H + y * W);
          e.size = SIZE_W'(w); e.stride = 1; e.dir = d;
          exp.push_back(e);
        end
    got.delete();
    @(negedge clk);
    cfg_ds_width = SIZE_W'(dw); cfg_ds_height = SIZE_W'(dh); cfg_ds_depth = SIZE_W'(dd);
    tile_x = SIZE_W'(tx); tile_y = SIZE_W'(ty); tile_z = SIZE_W'(tz); dir = d; start = 1;
    @(negedge clk); start = 0;
    while (!done && t < 5000) begin @(negedge clk); t++; end
    if (!done) begin
      // done may have pulsed in the start cycle for an empty tile
      if (exp.size() != 0) bad++;
    end
    repeat (2) @(negedge clk);
    checks++;
    if (got.size() != exp.size()) bad++;
    else foreach (exp[i]) if (got[i] != exp[i]) bad++;
    if (int'(rows) - rows0 != exp.size() || busy) bad++;
    if (bad != 0) begin
      failures++;
      $display("tile (%0d,%0d,%0d) of %0dx%0dx%0d: %0d rows expected, %0d issued, %0d mismatches",
               tx, ty, tz, dw, dh, dd, exp.size(), got.size(), bad);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    cfg_ds_base = 32'h3000_0000; cfg_sp_base = 16'd100;
    // data set 10 x 7 x 5: full tiles and tiles clipped in x (2), y (1), z (1)
    for (int tz = 0; tz < 3; tz++)
      for (int ty = 0; ty < 3; ty++)
        for (int tx = 0; tx < 3; tx++)
          tile(10, 7, 5, tx, ty, tz, (tx + ty + tz) % 2 ? DIR_STORE : DIR_LOAD);
    // outside the data set in each direction
    tile(10, 7, 5, 3, 0, 0, DIR_LOAD);
    tile(10, 7, 5, 0, 3, 0, DIR_LOAD);
    tile(10, 7, 5, 0, 0, 3, DIR_LOAD);
    // exact multiple
    cfg_sp_base = '0;
    for (int i = 0; i < 20; i++)
      tile(8, 6, 4, $urandom_range(0, 1), $urandom_range(0, 1), $urandom_range(0, 1), DIR_LOAD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
