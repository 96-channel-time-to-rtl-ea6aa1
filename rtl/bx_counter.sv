// bx_counter -- bunch crossing counter, the coarse part of every time stamp.
//
// A BX_W-bit (15-bit) counter incremented on every rising edge of the 40 MHz
// bunch-crossing clock and cleared synchronously by bc_reset. It wraps to 0
// after 2^15 - 1. The width follows the specification; the reset behaviour and
// the free wrap are this design's choices.
`timescale 1ps / 100fs
module bx_counter
  import rpc_lb_pkg::*;
#(
  parameter int unsigned W = BX_W
) (
  input  logic         clk_40,
  input  logic         bc_reset,
  output logic [W-1:0] bc_value
);
  always_ff @(posedge clk_40) begin
    if (bc_reset) bc_value <= '0;
    else          bc_value <= bc_value + 1'b1;
  end

endmodule
