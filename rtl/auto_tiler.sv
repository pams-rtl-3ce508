// auto_tiler -- moves one scratchpad-sized tile of a 3D data set between
// main memory and the scratchpad.
//
// The data set is described as it is programmed in software: a base address
// and its width, height and depth in words (cfg_ds_*), stored x fastest, then
// y, then z, so element (x, y, z) is at base + (z*height + y)*width + x.  The
// scratchpad holds SP_W x SP_H x SP_B words; a tile is the block of that size
// whose corner is tile index (tile_x, tile_y, tile_z) times the scratchpad
// dimensions.  On start the tiler walks the tile's rows (the SP_W words that
// are contiguous in main memory), y fastest then z, and hands each row to the
// main memory controller as a unit-stride descriptor; row (y, z) goes to
// scratchpad address cfg_sp_base + z*SP_W*SP_H + y*SP_W, the layout of the 3D
// scratchpad.  Tiles at the edge of a data set whose size is not a multiple
// of the scratchpad dimensions are clipped; a tile wholly outside the data
// set finishes at once with no transfer.
// That the memory system divides a main-memory data set into tiles of the
// scratchpad's size and transfers one tile at a time follows the memory
// system as described, as do the data-set and scratchpad fields; the row
// order, the one-descriptor-per-row expansion, the clipping and the
// handshake are choices of this design.
//
// Interface: start (with tile_*, dir) while !busy; done pulses when the
// last row has completed.  Towards the controller: mc_req asks for it with
// mc_desc; a row starts in a cycle where mc_req and mc_grant are both high,
// and the next row is not requested before mc_done.  rows counts the rows
// transferred since reset.
module auto_tiler
  import pams_pkg::*;
#(
  parameter int unsigned SP_W = 32,    // scratchpad width  (words per row)
  parameter int unsigned SP_H = 32,    // scratchpad height (rows per plane)
  parameter int unsigned SP_B = 64     // scratchpad blocks (planes)
) (
  input  logic              clk,
  input  logic              rst_n,
  // data set and scratchpad description
  input  maddr_t            cfg_ds_base,
  input  logic [SIZE_W-1:0] cfg_ds_width,
  input  logic [SIZE_W-1:0] cfg_ds_height,
  input  logic [SIZE_W-1:0] cfg_ds_depth,
  input  laddr_t            cfg_sp_base,
  // tile command
  input  logic              start,
  input  logic [SIZE_W-1:0] tile_x,
  input  logic [SIZE_W-1:0] tile_y,
  input  logic [SIZE_W-1:0] tile_z,
  input  dir_e              dir,
  output logic              busy,
  output logic              done,
  // main memory controller
  output logic              mc_req,
  output descriptor_t       mc_desc,
  input  logic              mc_grant,
  input  logic              mc_done,
  output logic [31:0]       rows
);

  localparam int unsigned XW = 2 * SIZE_W + 1;   // wide enough for index*dimension

  typedef enum logic [1:0] { T_IDLE, T_ISSUE, T_WAIT } tstate_e;
  tstate_e state;

  logic [SIZE_W-1:0] w_q, h_q, d_q;      // clipped tile dimensions
  logic [SIZE_W-1:0] yi, zi;             // current row inside the tile
  maddr_t            row_addr, plane_addr; // main address of row (yi, zi) and of (0, zi)
  maddr_t            plane_step;         // width*height
  logic [SIZE_W-1:0] width_q;
  laddr_t            sp_base_q;
  dir_e              dir_q;

  // tile corner and clipped sizes, from the command
  logic [XW-1:0] x0, y0, z0;
  logic [SIZE_W-1:0] w_n, h_n, d_n;
  maddr_t        first_addr;

  function automatic logic [SIZE_W-1:0] clip(logic [XW-1:0] origin, logic [SIZE_W-1:0] total,
                                             int unsigned span);
    if (origin >= XW'(total)) return '0;
    if (XW'(total) - origin < XW'(span)) return SIZE_W'(XW'(total) - origin);
    return SIZE_W'(span);
  endfunction

  always_comb begin
    x0  = XW'(tile_x) * XW'(SP_W);
    y0  = XW'(tile_y) * XW'(SP_H);
    z0  = XW'(tile_z) * XW'(SP_B);
    w_n = clip(x0, cfg_ds_width,  SP_W);
    h_n = clip(y0, cfg_ds_height, SP_H);
    d_n = clip(z0, cfg_ds_depth,  SP_B);
    first_addr = cfg_ds_base +
                 maddr_t'((z0 * XW'(cfg_ds_height) + y0) * XW'(cfg_ds_width) + x0);
  end

  always_comb begin
    mc_desc            = '0;
    mc_desc.main_addr  = row_addr;
    mc_desc.local_addr = sp_base_q + laddr_t'(zi * SIZE_W'(SP_W * SP_H)) + laddr_t'(yi * SIZE_W'(SP_W));
    mc_desc.size       = w_q;
    mc_desc.stride     = stride_t'(1);
    mc_desc.dir        = dir_q;
  end

  assign mc_req = (state == T_ISSUE);
  assign busy   = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      done       <= 1'b0;
      w_q        <= '0;
      h_q        <= '0;
      d_q        <= '0;
      yi         <= '0;
      zi         <= '0;
      row_addr   <= '0;
      plane_addr <= '0;
      plane_step <= '0;
      width_q    <= '0;
      sp_base_q  <= '0;
      dir_q      <= DIR_LOAD;
      rows       <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          w_q        <= w_n;
          h_q        <= h_n;
          d_q        <= d_n;
          yi         <= '0;
          zi         <= '0;
          row_addr   <= first_addr;
          plane_addr <= first_addr;
          plane_step <= maddr_t'(cfg_ds_width) * maddr_t'(cfg_ds_height);
          width_q    <= cfg_ds_width;
          sp_base_q  <= cfg_sp_base;
          dir_q      <= dir;
          if (w_n == 0 || h_n == 0 || d_n == 0) done <= 1'b1;
          else state <= T_ISSUE;
        end
        T_ISSUE: if (mc_grant) state <= T_WAIT;
        T_WAIT: if (mc_done) begin
          rows <= rows + 1;
          if (yi + 1'b1 < h_q) begin
            yi       <= yi + 1'b1;
            row_addr <= row_addr + maddr_t'(width_q);
            state    <= T_ISSUE;
          end else if (zi + 1'b1 < d_q) begin
            yi         <= '0;
            zi         <= zi + 1'b1;
            row_addr   <= plane_addr + plane_step;
            plane_addr <= plane_addr + plane_step;
            state      <= T_ISSUE;
          end else begin
            done  <= 1'b1;
            state <= T_IDLE;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
