// pams_pkg -- types and constants shared by the Pattern Aware Memory System.
//
// A PAMS access pattern is described by a descriptor whose fields are the
// ones the memory system is built around: the scratchpad (local) base
// address, the main-memory base address, a priority, a size (number of
// elements), a stride (distance between consecutive elements, in words) and an
// offset that links to the next descriptor of a chained pattern.  The field
// widths, the "link" valid bit that says whether the offset is used, and the
// transfer direction bit are choices of this design.
//
// The SDRAM geometry (8 banks, 16K rows, 1K columns of 32-bit words) and the
// word address split {row, bank, column} are also choices of this design; the
// split places consecutive rows of the same bank 8K words apart so that long
// strides spread across banks.
package pams_pkg;

  localparam int unsigned DATA_W    = 32;  // data word width
  localparam int unsigned MADDR_W   = 32;  // main-memory word address width
  localparam int unsigned LADDR_W   = 16;  // scratchpad word address width (32*32*64 words)
  localparam int unsigned SIZE_W    = 16;  // elements per descriptor
  localparam int unsigned PRIO_W    = 4;   // priority field
  localparam int unsigned DIDX_W    = 6;   // descriptor index (64 descriptors)

  localparam int unsigned BANK_BITS = 3;
  localparam int unsigned ROW_BITS  = 14;
  localparam int unsigned COL_BITS  = 10;

  typedef logic [MADDR_W-1:0]        maddr_t;
  typedef logic [LADDR_W-1:0]        laddr_t;
  typedef logic [DATA_W-1:0]         word_t;
  typedef logic signed [MADDR_W-1:0] stride_t;
  typedef logic [DIDX_W-1:0]         didx_t;

  // Direction of the transfer a descriptor describes.
  typedef enum logic {
    DIR_LOAD  = 1'b0,   // main memory -> scratchpad
    DIR_STORE = 1'b1    // scratchpad  -> main memory
  } dir_e;

  typedef struct packed {
    laddr_t              local_addr;  // scratchpad base address
    maddr_t              main_addr;   // main-memory base address
    logic [PRIO_W-1:0]   prio;        // larger value is served first
    logic [SIZE_W-1:0]   size;        // number of elements
    stride_t             stride;      // word distance between elements
    didx_t               offset;      // index of the next linked descriptor
    logic                link;        // offset is valid
    dir_e                dir;         // transfer direction
  } descriptor_t;

  // SDRAM command set seen by the main memory.
  typedef enum logic [2:0] {
    SD_NOP = 3'd0,
    SD_ACT = 3'd1,
    SD_RD  = 3'd2,
    SD_WR  = 3'd3,
    SD_PRE = 3'd4,     // precharge the bank on sd_bank
    SD_PREA = 3'd5     // precharge all banks
  } sdram_cmd_e;

  typedef struct packed {
    logic [ROW_BITS-1:0]  row;
    logic [BANK_BITS-1:0] bank;
    logic [COL_BITS-1:0]  col;
  } brc_t;

  // Split a main-memory word address into SDRAM row, bank and column.
  function automatic brc_t split_addr(maddr_t a);
    brc_t r;
    r.col  = a[COL_BITS-1:0];
    r.bank = a[COL_BITS +: BANK_BITS];
    r.row  = a[COL_BITS+BANK_BITS +: ROW_BITS];
    return r;
  endfunction

endpackage
