// mlb_frame_merger -- builds the 256-bit frame a Master Link Board sends to the
// trigger from its own hits and those of its right and left slave boards.
//
// Each input is a Link Board frame: 6 hits of 11 bits (7-bit strip, 4-bit
// sub-BX) and a 12-bit BX number. The output frame, most significant bit first:
//   [255:254] header           [253:234] FEC (left 0 for a downstream encoder)
//   [233:168] right slave hits [167:102] master hits  [101:36] left slave hits
//   [35:24]   BCN of the master board
//   [23:18]   RBCN right: right slave BX minus master BX, signed 6 bits
//   [17:12]   RBCN left:  left slave BX minus master BX, signed 6 bits
//   [11:0]    unused, 0
// Differences outside -32..31 are saturated; a slave frame without hits gives
// RBCN 0. The frame is registered on clk; frame_valid is set when any of the
// three inputs carries hits. Field order and widths follow the specification;
// header value, saturation and the zero FEC/unused fields are this design's
// choices.
`timescale 1ps / 100fs
module mlb_frame_merger
  import rpc_lb_pkg::*;
#(
  parameter logic [HDR_W-1:0] HEADER = 2'b01
) (
  input  logic                   clk,
  input  logic                   rst,
  input  lb_frame_t              mlb,
  input  lb_frame_t              slbr,
  input  lb_frame_t              slbl,
  output logic [MLB_FRAME_W-1:0] frame,
  output logic                   frame_valid
);
  localparam int unsigned USED_W = HDR_W + FEC_W + 3*LB_HITS_W + FRAME_BX_W + 2*RBCN_W;
  localparam int unsigned PAD_W  = MLB_FRAME_W - USED_W;

  function automatic logic [RBCN_W-1:0] rbcn(input lb_frame_t s, input logic [FRAME_BX_W-1:0] m);
    logic signed [FRAME_BX_W-1:0] d;
    if (!s.valid) return '0;
    d = $signed(s.bx - m);
    if (d > $signed(FRAME_BX_W'(2**(RBCN_W-1) - 1)))  return RBCN_W'(2**(RBCN_W-1) - 1);
    if (d < -$signed(FRAME_BX_W'(2**(RBCN_W-1))))     return RBCN_W'(2**(RBCN_W-1));
    return d[RBCN_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      frame       <= '0;
      frame_valid <= 1'b0;
    end else begin
      frame <= {HEADER, {FEC_W{1'b0}},
                slbr.hits, mlb.hits, slbl.hits,
                mlb.bx, rbcn(slbr, mlb.bx), rbcn(slbl, mlb.bx),
                {PAD_W{1'b0}}};
      frame_valid <= mlb.valid | slbr.valid | slbl.valid;
    end
  end

endmodule
