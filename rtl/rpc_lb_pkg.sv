// rpc_lb_pkg -- constants and types shared by the RPC Link Board time-stamping
// and data-collection logic.
//
// A hit time stamp is 19 bits: a 15-bit bunch-crossing (BX) number followed by a
// 4-bit sub-BX index (1/16 of the 25 ns crossing, about 1.56 ns). A hit sent
// towards the trigger is 11 bits: a 7-bit strip number (1..96, 0 = empty slot)
// and the 4-bit sub-BX. A Link Board frame carries 6 hits and a 12-bit BX
// number (78 bits); the Master Link Board packs three of them into a 256-bit
// frame. The field widths are the ones the design specification gives; the
// empty-slot code 0 and the 2-bit header value are this design's choices.
`timescale 1ps / 100fs
package rpc_lb_pkg;

  localparam int unsigned N_CH           = 96;  // RPC strips per Link Board
  localparam int unsigned BX_W           = 15;  // bunch crossing counter width
  localparam int unsigned SUBBX_W        = 4;   // fine time width
  localparam int unsigned SAMPLES_PER_BX = 16;  // 4 clocks x 4 phases
  localparam int unsigned STAMP_W        = BX_W + SUBBX_W; // 19
  localparam int unsigned STRIP_W        = 7;   // strip number 1..96
  localparam int unsigned HITS_PER_FRAME = 6;   // hits per Link Board per BX
  localparam int unsigned FRAME_BX_W     = 12;  // BX number in a LB frame
  localparam int unsigned HIT_BUF_DEPTH  = 42;  // hits buffered without loss
  localparam int unsigned RBCN_W         = 6;   // slave BX difference field
  localparam int unsigned MLB_FRAME_W    = 256; // Master LB output frame
  localparam int unsigned HDR_W          = 2;
  localparam int unsigned FEC_W          = 20;
  localparam int unsigned TAP_W          = 5;   // micro-step delay tap width

  typedef logic [STAMP_W-1:0] stamp_t;

  typedef struct packed {
    logic [STRIP_W-1:0] strip;   // 1..96, 0 = no hit in this slot
    logic [SUBBX_W-1:0] subbx;
  } hit_t;                       // 11 bits

  localparam int unsigned HIT_W      = $bits(hit_t);
  localparam int unsigned LB_HITS_W  = HITS_PER_FRAME * HIT_W;   // 66
  localparam int unsigned LB_FRAME_W = LB_HITS_W + FRAME_BX_W;   // 78

  // Frame of one Link Board. hits[HITS_PER_FRAME-1] is the first hit ("Hit 1")
  // and sits at the most significant end of the packed vector.
  typedef struct packed {
    logic                                 valid;  // at least one hit
    hit_t [HITS_PER_FRAME-1:0]            hits;
    logic [FRAME_BX_W-1:0]                bx;
  } lb_frame_t;

  // Buffered hit inside the data collector.
  typedef struct packed {
    logic [STRIP_W-1:0] strip;
    logic [SUBBX_W-1:0] subbx;
    logic [BX_W-1:0]    bx;
  } buf_hit_t;

endpackage
