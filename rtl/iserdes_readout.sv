// iserdes_readout -- turns the oversampled input of one RPC channel into a
// 4-bit sub-bunch-crossing time and a new-event flag.
//
// Every 160 MHz cycle the sampler delivers four samples (isds_data[0] earliest).
// They enter a five-stage, four-bit shift register, which therefore always holds
// the last 20 samples in time order. On each rising edge of clk_40 the newest
// 16 samples (one full 25 ns crossing, 1.5625 ns apart) are concatenated into a
// 16-bit window, together with the sample just before it. In the next clk_40
// cycle an encoder looks for the first 0->1 transition in the window: its
// position 0..15 is tdc_out, and new_event is set if one was found. An input
// that is already high when the window starts gives no event, so a long RPC
// pulse is reported once, at its rising edge.
//
// Timing: clk_40 and clk_160_0 come from the same clock generator and their
// rising edges coincide. Outputs are registered on clk_40; the fixed latency
// from input edge to output is removed by the latency compensator downstream.
// The five-stage shift register, the 16-bit concatenation, the 16-to-4 encoder
// and the event detector follow the specification; using the fifth stage for
// the sample before the window, the first-edge encoding and the synchronous
// reset are this design's choices.
`timescale 1ps / 100fs
module iserdes_readout
  import rpc_lb_pkg::*;
#(
  parameter int unsigned STAGES = 5
) (
  input  logic               clk_160_0,
  input  logic               clk_40,
  input  logic               rst,
  input  logic [3:0]         isds_data,
  output logic               new_event,
  output logic [SUBBX_W-1:0] tdc_out
);
  localparam int unsigned NS = 4 * STAGES;          // samples held
  localparam int unsigned WN = SAMPLES_PER_BX;      // samples per window

  // Stage 0 is the newest word.
  logic [STAGES-1:0][3:0] stage;

  always_ff @(posedge clk_160_0) begin
    if (rst) stage <= '0;
    else     stage <= {stage[STAGES-2:0], isds_data};
  end

  // Samples in time order: samples[0] oldest, samples[NS-1] newest.
  logic [NS-1:0] samples;
  always_comb begin
    for (int s = 0; s < STAGES; s++)
      samples[4*s +: 4] = stage[STAGES-1-s];
  end

  // 16-bit concatenation plus the preceding sample, captured once per crossing.
  logic [WN:0] window;   // window[0] = sample before the crossing
  always_ff @(posedge clk_40) begin
    if (rst) window <= '0;
    else     window <= samples[NS-1 -: WN+1];
  end

  // 16-to-4 encoder: first rising edge in the window.
  logic [WN-1:0]      edges;
  logic               found;
  logic [SUBBX_W-1:0] first;
  always_comb begin
    edges = window[WN:1] & ~window[WN-1:0];
    found = |edges;
    first = '0;
    for (int k = WN-1; k >= 0; k--)
      if (edges[k]) first = SUBBX_W'(k);
  end

  always_ff @(posedge clk_40) begin
    if (rst) begin
      new_event <= 1'b0;
      tdc_out   <= '0;
    end else begin
      new_event <= found;
      tdc_out   <= found ? first : '0;
    end
  end

endmodule
