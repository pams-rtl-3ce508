// address_manager -- run-time Address Manager of the memory system.
//
// A core that cannot describe its accesses before execution hands its
// addresses one by one to the Address Manager over a select/ready handshake:
// an address is taken at a clock edge where select and ready are both high,
// and addr_last marks the final address of a request stream.  The addresses
// are buffered in a FIFO, then a stride detector (reg 0, comparator 0) and a
// pattern controller (reg 1, comparator 1, increment) turn constant-stride
// runs into descriptors with Main Address, Stride and Size.  Each time the
// stride changes a new descriptor block is allocated and the previous one's
// Offset points to it, so an irregular stream becomes a chain of linked
// descriptors in the irregular descriptor memory.  When the chain is complete
// chain_valid pulses with the index of its first descriptor, to be scheduled
// by the memory manager.  This follows the described structure; the FIFO depth,
// the scratchpad placement (elements packed one after another from
// local_base) and the use of cfg_prio for every descriptor are choices of this
// design.
//
// Timing: an address reaches the pattern controller three cycles after it is
// taken; a descriptor is written one cycle after it is closed.  The FIFO is
// not popped in the cycle after the last address of a stream.
module address_manager
  import pams_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic              select,
  input  maddr_t            addr,
  input  logic              addr_last,
  output logic              ready,
  input  laddr_t            cfg_local_base,
  input  logic [PRIO_W-1:0] cfg_prio,
  // irregular descriptor memory write port
  output logic              dwr_en,
  output didx_t             dwr_idx,
  output descriptor_t       dwr_desc,
  // to the memory manager
  output logic              chain_valid,
  output didx_t             chain_head,
  output logic              start_seen    // a stride change closed a descriptor
);

  logic                   f_empty, f_full, f_pop, pop_block;
  logic [MADDR_W:0]       f_out;
  logic [$clog2(FIFO_DEPTH):0] f_count;

  assign ready = !f_full;

  sync_fifo #(.WIDTH(MADDR_W+1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push    (select),
    .in_data ({addr_last, addr}),
    .pop     (f_pop),
    .out_data(f_out),
    .empty   (f_empty),
    .full    (f_full),
    .count   (f_count)
  );

  assign f_pop = !f_empty && !pop_block;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pop_block <= 1'b0;
    else        pop_block <= f_pop && f_out[MADDR_W];
  end

  logic    sd_valid, sd_first, sd_last;
  maddr_t  sd_addr;
  stride_t sd_stride;

  stride_detector u_sd (
    .clk, .rst_n,
    .in_valid  (f_pop),
    .in_addr   (f_out[MADDR_W-1:0]),
    .in_last   (f_out[MADDR_W]),
    .out_valid (sd_valid),
    .out_first (sd_first),
    .out_last  (sd_last),
    .out_addr  (sd_addr),
    .out_stride(sd_stride)
  );

  logic              pc_valid, pc_last;
  maddr_t            pc_main;
  stride_t           pc_stride;
  logic [SIZE_W-1:0] pc_size;

  pattern_controller u_pc (
    .clk, .rst_n,
    .in_valid   (sd_valid),
    .in_first   (sd_first),
    .in_last    (sd_last),
    .in_addr    (sd_addr),
    .in_stride  (sd_stride),
    .desc_valid (pc_valid),
    .desc_last  (pc_last),
    .desc_main  (pc_main),
    .desc_stride(pc_stride),
    .desc_size  (pc_size),
    .start      (start_seen)
  );

  // descriptor allocation
  didx_t  alloc_ptr, head_q;
  laddr_t lcur;
  logic   in_chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_ptr   <= '0;
      head_q      <= '0;
      lcur        <= '0;
      in_chain    <= 1'b0;
      dwr_en      <= 1'b0;
      dwr_idx     <= '0;
      dwr_desc    <= '0;
      chain_valid <= 1'b0;
      chain_head  <= '0;
    end else begin
      dwr_en      <= 1'b0;
      chain_valid <= 1'b0;
      if (pc_valid) begin
        automatic laddr_t la = in_chain ? lcur : cfg_local_base;
        dwr_en              <= 1'b1;
        dwr_idx             <= alloc_ptr;
        dwr_desc.local_addr <= la;
        dwr_desc.main_addr  <= pc_main;
        dwr_desc.prio       <= cfg_prio;
        dwr_desc.size       <= pc_size;
        dwr_desc.stride     <= pc_stride;
        dwr_desc.offset     <= alloc_ptr + 1'b1;
        dwr_desc.link       <= !pc_last;
        dwr_desc.dir        <= DIR_LOAD;
        lcur                <= la + laddr_t'(pc_size);
        alloc_ptr           <= alloc_ptr + 1'b1;
        if (!in_chain) head_q <= alloc_ptr;
        in_chain            <= !pc_last;
        if (pc_last) begin
          chain_valid <= 1'b1;
          chain_head  <= in_chain ? head_q : alloc_ptr;
        end
      end
    end
  end

endmodule
