// pattern_controller -- second stage of the run-time Address Manager.
//
// It turns the (address, stride) stream of the stride detector into
// descriptors.  The first address of a pattern becomes its Main Address and
// the first stride is kept in "reg 1" as the pattern's Stride.  Each further
// stride is compared with reg 1 ("comparator 1"): while they are equal the
// Size is incremented; when they differ a "start" is signalled, the current
// descriptor is closed and a new one is opened at the current address.  This
// is the structure the memory system describes.  Closing the last descriptor
// of a stream on the in_last flag, and closing a descriptor whose Size would
// overflow, are choices of this design.
//
// Output: desc_valid pulses for one cycle with the closed descriptor's
// desc_main, desc_stride, desc_size, and desc_last set for the final one of a
// stream.  start pulses with each descriptor closed by a stride change.
// An in_last element that itself causes a start produces two descriptors on
// consecutive cycles; inputs must not arrive in the cycle after such an
// element (the address manager leaves a gap after every stream).
module pattern_controller
  import pams_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  logic              in_last,
  input  maddr_t            in_addr,
  input  stride_t           in_stride,
  output logic              desc_valid,
  output logic              desc_last,
  output maddr_t            desc_main,
  output stride_t           desc_stride,
  output logic [SIZE_W-1:0] desc_size,
  output logic              start
);

  logic              open_q;        // a descriptor is being built
  logic              stride_known;  // reg 1 holds this pattern's stride
  maddr_t            main_q;
  stride_t           reg1;
  logic [SIZE_W-1:0] size_q;
  logic              flush_pend;    // emit the open descriptor next cycle as last

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q       <= 1'b0;
      stride_known <= 1'b0;
      main_q       <= '0;
      reg1         <= '0;
      size_q       <= '0;
      flush_pend   <= 1'b0;
      desc_valid   <= 1'b0;
      desc_last    <= 1'b0;
      desc_main    <= '0;
      desc_stride  <= '0;
      desc_size    <= '0;
      start        <= 1'b0;
    end else begin
      desc_valid <= 1'b0;
      desc_last  <= 1'b0;
      start      <= 1'b0;
      if (flush_pend) begin
        desc_valid  <= 1'b1;
        desc_last   <= 1'b1;
        desc_main   <= main_q;
        desc_stride <= reg1;
        desc_size   <= size_q;
        open_q      <= 1'b0;
        flush_pend  <= 1'b0;
      end else if (in_valid) begin
        if (!open_q || in_first) begin
          // first address of a stream: open a descriptor
          main_q       <= in_addr;
          reg1         <= '0;
          size_q       <= SIZE_W'(1);
          stride_known <= 1'b0;
          open_q       <= 1'b1;
          flush_pend   <= in_last;
        end else if (!stride_known) begin
          reg1         <= in_stride;
          stride_known <= 1'b1;
          size_q       <= size_q + 1'b1;
          flush_pend   <= in_last;
        end else if (in_stride == reg1 && size_q != '1) begin
          size_q     <= size_q + 1'b1;     // increment
          flush_pend <= in_last;
        end else begin
          // stride changed: close this descriptor, open a new one here
          desc_valid   <= 1'b1;
          desc_main    <= main_q;
          desc_stride  <= reg1;
          desc_size    <= size_q;
          start        <= 1'b1;
          main_q       <= in_addr;
          reg1         <= '0;
          size_q       <= SIZE_W'(1);
          stride_known <= 1'b0;
          flush_pend   <= in_last;
        end
      end
    end
  end

endmodule
