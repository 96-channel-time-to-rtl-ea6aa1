// latency_compensator -- removes the fixed offset of a channel's time stamp.
//
// The raw stamp of a hit is {bx_value, tdc_value}: the BX counter value in the
// crossing the readout reports the hit, and the 4-bit sub-BX. It is late by a
// constant amount made of the TTC clock phase, the RPC signal propagation delay
// and the pipeline latency of the TDC. macro_offset, in sub-BX units of
// 1.5625 ns, is subtracted modulo 2^19, so a correct offset gives the crossing
// and sub-BX in which the hit really arrived. Finer trimming, in 48 ps steps,
// is done before sampling by the channel's input delay. One register stage:
// comp_tdc_valid/comp_tdc_value appear one clk_40 cycle after tdc_valid.
// The 19-bit layout {bx[14:0], sub[3:0]} follows the specification; the
// run-time offset input and the single pipeline stage are this design's choices.
`timescale 1ps / 100fs
module latency_compensator
  import rpc_lb_pkg::*;
(
  input  logic               clk_40,
  input  logic               rst,
  input  logic               tdc_valid,
  input  logic [SUBBX_W-1:0] tdc_value,
  input  logic [BX_W-1:0]    bx_value,
  input  stamp_t             macro_offset,
  output logic               comp_tdc_valid,
  output stamp_t             comp_tdc_value
);
  always_ff @(posedge clk_40) begin
    if (rst) begin
      comp_tdc_valid <= 1'b0;
      comp_tdc_value <= '0;
    end else begin
      comp_tdc_valid <= tdc_valid;
      if (tdc_valid)
        comp_tdc_value <= {bx_value, tdc_value} - macro_offset;
    end
  end

endmodule
