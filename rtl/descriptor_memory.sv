// descriptor_memory -- storage for PAMS pattern descriptors.
//
// The memory system keeps two of these: the regular descriptor memory, which
// the processing core fills over its program line before execution with the
// descriptors of static (compile-time predictable) data structures, and the
// irregular descriptor memory, which the run-time Address Manager fills with
// descriptors it builds from the addresses a core requests.  Each entry holds
// one pams_pkg::descriptor_t (local address, main address, priority, size,
// stride, offset).
//
// Interface: one synchronous write port (wr_en, wr_idx, wr_desc, written at
// the rising clock edge) and one combinational read port (rd_idx -> rd_desc),
// as a small distributed (LUT) RAM would give.  A write is visible on the read
// port from the next cycle.  The depth (64) is a choice of this design; the
// contents are cleared by reset so that no random descriptor is ever read.
module descriptor_memory
  import pams_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  didx_t       wr_idx,
  input  descriptor_t wr_desc,
  input  didx_t       rd_idx,
  output descriptor_t rd_desc
);

  descriptor_t mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (wr_en && (int'(wr_idx) < int'(DEPTH))) begin
      mem[wr_idx] <= wr_desc;
    end
  end

  assign rd_desc = (int'(rd_idx) < int'(DEPTH)) ? mem[rd_idx] : '0;

endmodule
