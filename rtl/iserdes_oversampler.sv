// iserdes_oversampler -- behavioural model of the FPGA input deserialiser used
// in oversampling mode as the first stage of the TDC.
//
// The serial input d is sampled on the rising edges of four 160 MHz clocks that
// are 90 degrees apart (clk = 0, oclk = 90, clkb = 180, oclkb = 270 degrees),
// i.e. every 1.5625 ns. On each rising edge of clk the four samples of the
// 160 MHz period that just ended are presented on q, with q[0] the earliest
// (phase 0) and q[3] the latest (phase 270). A rising input therefore shows as a
// thermometer word: edge in the first quarter -> 4'b1110, second -> 4'b1100,
// third -> 4'b1000, fourth -> 4'b0000 followed by 4'b1111. The pin set follows
// the vendor primitive; the one-cycle output latency is this model's choice.
// Although written as plain flip-flops, it stands for a hard block of the FPGA.
`timescale 1ps / 100fs
module iserdes_oversampler (
  input  logic       d,
  input  logic       clk,
  input  logic       oclk,
  input  logic       clkb,
  input  logic       oclkb,
  input  logic       rst,
  output logic [3:0] q
);
  logic s0, s90, s180, s270;

  always_ff @(posedge clk)   s0   <= d;
  always_ff @(posedge oclk)  s90  <= d;
  always_ff @(posedge clkb)  s180 <= d;
  always_ff @(posedge oclkb) s270 <= d;

  // s0 is read before this edge updates it, so it holds the phase-0 sample that
  // starts the period the other three samples belong to.
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= {s270, s180, s90, s0};
  end

endmodule
