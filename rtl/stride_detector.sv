// stride_detector -- first stage of the run-time Address Manager.
//
// Every address a core puts on the address bus is kept in "reg 0" and
// compared ("comparator 0") with the address before it; the difference is the
// stride Address(t) - Address(t-1) handed to the Pattern Controller.  The
// first address of a request stream (and the one after an address flagged
// in_last) has no predecessor and is passed on with out_first set.  The
// register/comparator structure is the one the memory system describes; the
// in_last flag that ends a stream is a choice of this design.
//
// Timing: one cycle.  An address accepted with in_valid at a clock edge
// appears on the out_* ports, with its stride, during the following cycle.
module stride_detector
  import pams_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  maddr_t  in_addr,
  input  logic    in_last,
  output logic    out_valid,
  output logic    out_first,   // no previous address: out_stride is meaningless
  output logic    out_last,
  output maddr_t  out_addr,    // Address(t)
  output stride_t out_stride   // Address(t) - Address(t-1)
);

  maddr_t reg0;        // Address(t-1)
  logic   have_prev;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg0       <= '0;
      have_prev  <= 1'b0;
      out_valid  <= 1'b0;
      out_first  <= 1'b0;
      out_last   <= 1'b0;
      out_addr   <= '0;
      out_stride <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_addr   <= in_addr;
        out_first  <= !have_prev;
        out_last   <= in_last;
        out_stride <= have_prev ? stride_t'(in_addr - reg0) : '0;
        reg0       <= in_addr;
        have_prev  <= !in_last;
      end
    end
  end

endmodule
