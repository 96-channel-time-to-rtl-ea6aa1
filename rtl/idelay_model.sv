// idelay_model -- behavioural model (not synthesizable) of the FPGA input delay
// element placed in front of each TDC sampler.
//
// dataout follows idatain after cntvaluein x TAP_PS picoseconds (transport
// delay: every edge is kept). The 48 ps step is the "micro step" the
// specification uses to trim the fine offset of each channel; the 5-bit tap
// width matches the delay-count bus of the FPGA primitive. Changing the tap
// takes effect for edges that arrive afterwards.
`timescale 1ps / 100fs
module idelay_model #(
  parameter int unsigned TAP_W  = 5,
  parameter int unsigned TAP_PS = 48
) (
  input  logic             idatain,
  input  logic [TAP_W-1:0] cntvaluein,
  output logic             dataout
);
  initial dataout = 1'b0;

  always @(idatain) begin
    dataout <= #(cntvaluein * TAP_PS) idatain;
  end

endmodule
