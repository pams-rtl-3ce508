// scratchpad_memory -- programmable 3D scratchpad of the memory system.
//
// The scratchpad holds whole data patterns (tiles) placed at known local
// addresses by the memory manager.  It is organised as SCRATCHPAD_BLOCKS
// planes of SCRATCHPAD_WIDTH (NX) x SCRATCHPAD_HEIGHT (NZ) words; with the
// default 32 x 32 x 64 every plane is one 1K x 32-bit block RAM.  A local
// address is {plane, z, x}: plane*NX*NZ + z*NX + x.  The sizes and the
// plane-per-block-RAM organisation follow the memory system; the 32-bit word,
// the flat address and the two ports are choices of this design.
//
// Two synchronous ports, as a true dual-port block RAM: port A (main memory
// side: the memory controller writes loaded patterns and reads patterns to be
// stored) and port B (core side: the data manager reads, the core writes
// results).  Read data appears the cycle after en; a read returns the old
// word when the same cycle writes it.  If both ports write the same word in
// one cycle, port B wins.  The contents are not reset.
module scratchpad_memory
  import pams_pkg::*;
#(
  parameter int unsigned SCRATCHPAD_WIDTH  = 32,  // NX
  parameter int unsigned SCRATCHPAD_HEIGHT = 32,  // NZ
  parameter int unsigned SCRATCHPAD_BLOCKS = 64   // number of planes
) (
  input  logic   clk,
  input  logic   a_en,
  input  logic   a_we,
  input  laddr_t a_addr,
  input  word_t  a_wdata,
  output word_t  a_rdata,
  input  logic   b_en,
  input  logic   b_we,
  input  laddr_t b_addr,
  input  word_t  b_wdata,
  output word_t  b_rdata
);

  localparam int unsigned PLANE = SCRATCHPAD_WIDTH * SCRATCHPAD_HEIGHT;
  localparam int unsigned WORDS = PLANE * SCRATCHPAD_BLOCKS;
  localparam int unsigned AW    = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr[AW-1:0]] <= a_wdata;
      a_rdata <= mem[a_addr[AW-1:0]];
    end
    if (b_en) begin
      if (b_we) mem[b_addr[AW-1:0]] <= b_wdata;
      b_rdata <= mem[b_addr[AW-1:0]];
    end
  end

endmodule
