// tdc_channel -- one time-to-digital converter channel: micro-step input delay,
// four-phase oversampler and readout.
//
// isds_in is delayed by idelay_tap x 48 ps, sampled every 1.5625 ns by the
// four 160 MHz clocks, and the readout reports, once per 25 ns crossing, whether
// a rising edge arrived (new_event) and in which of the 16 sub-intervals
// (tdc_out). Outputs are registered on clk_40 and lag the input by a fixed
// number of crossings. The chain delay -> deserialiser -> readout and the port
// names follow the specification; the delay model and the sampler stand for
// hard blocks of the FPGA.
`timescale 1ps / 100fs
module tdc_channel
  import rpc_lb_pkg::*;
(
  input  logic               clk_40,
  input  logic               clk_160_0,
  input  logic               clk_160_90,
  input  logic               clk_160_180,
  input  logic               clk_160_270,
  input  logic               isds_rst,
  input  logic               isds_in,
  input  logic [TAP_W-1:0]   idelay_tap,
  output logic               new_event,
  output logic [SUBBX_W-1:0] tdc_out
);
  logic       idly_out;
  logic [3:0] isds_data;

  idelay_model #(.TAP_W(TAP_W)) u_idelay (
    .idatain    (isds_in),
    .cntvaluein (idelay_tap),
    .dataout    (idly_out)
  );

  iserdes_oversampler u_iserdes (
    .d     (idly_out),
    .clk   (clk_160_0),
    .oclk  (clk_160_90),
    .clkb  (clk_160_180),
    .oclkb (clk_160_270),
    .rst   (isds_rst),
    .q     (isds_data)
  );

  iserdes_readout u_readout (
    .clk_160_0 (clk_160_0),
    .clk_40    (clk_40),
    .rst       (isds_rst),
    .isds_data (isds_data),
    .new_event (new_event),
    .tdc_out   (tdc_out)
  );

endmodule
