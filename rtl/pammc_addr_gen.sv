// pammc_addr_gen -- address generator of the Pattern Aware Main Memory
// Controller.
//
// A run-time descriptor block gives the pattern's Main Memory Address, its
// Stride and its stream length.  The stride is held in a register and added
// to the current address to form the next one; a counter of generated
// addresses is compared with the stream length and, when they are equal, the
// pattern is acknowledged (ack) and the generator goes idle.  The
// register/adder/compare structure follows the controller as described; the
// valid/ready output handshake is a choice of this design.
//
// Timing: start loads the descriptor; the first address is valid the next
// cycle and one address is produced per cycle while out_ready is high.
// out_last marks the final address; ack pulses in the cycle after it is taken.
// A start with stream = 0 acknowledges at once.
module pammc_addr_gen
  import pams_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  maddr_t            main_addr,
  input  stride_t           stride,
  input  logic [SIZE_W-1:0] stream,
  output logic              busy,
  output logic              out_valid,
  output maddr_t            out_addr,
  output logic              out_last,
  input  logic              out_ready,
  output logic              ack
);

  stride_t           stride_q;
  logic [SIZE_W-1:0] stream_q, count;

  assign out_valid = busy;
  assign out_last  = busy && (count + 1'b1 == stream_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      out_addr <= '0;
      stride_q <= '0;
      stream_q <= '0;
      count    <= '0;
      ack      <= 1'b0;
    end else begin
      ack <= 1'b0;
      if (start && !busy) begin
        out_addr <= main_addr;
        stride_q <= stride;
        stream_q <= stream;
        count    <= '0;
        busy     <= (stream != 0);
        ack      <= (stream == 0);
      end else if (busy && out_ready) begin
        out_addr <= out_addr + maddr_t'(stride_q);   // address increment
        count    <= count + 1'b1;
        if (out_last) begin
          busy <= 1'b0;
          ack  <= 1'b1;
        end
      end
    end
  end

endmodule
