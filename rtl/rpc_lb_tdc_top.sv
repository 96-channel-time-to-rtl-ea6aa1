// rpc_lb_tdc_top -- time stamping and data collection of an RPC Link Board.
//
// Each of the N_CH (96) RPC strip inputs goes through its own TDC channel:
// a 48 ps-step input delay, four-phase 160 MHz oversampling (16 samples per
// 25 ns bunch crossing) and a readout that reports the sub-BX (0..15) of every
// rising edge. A shared 15-bit bunch crossing counter gives the coarse time;
// per channel a latency compensator joins the two into a 19-bit stamp and
// subtracts the channel's configured offset. The data collector buffers up to
// 42 hits and emits one Link Board frame per crossing with up to 6 hits
// (strip number + sub-BX) and a 12-bit BX number. The Master Link Board merger
// packs this board's frame with the frames of the right and left slave boards
// (top-level inputs) into the 256-bit frame for the trigger.
//
// For self-test, a test pulse generator emits pulses at BX 500 and 1500; with
// tp_loopback set they replace rpc_in[0]. The compensated stamps of the
// channel chosen by mon_ch_sel are also written to a monitor FIFO read through
// fifo_rd_en. All logic outside the TDC sampling runs on clk_40.
//
// Resets: glb_rst clears the BX counter, compensators, collector, merger, FIFO
// and test pulse generator; isds_rst clears the TDC sampling and readout.
// The chain (clock manager -> TDC -> latency compensator, BX counter ->
// compensator), the frame formats and the self-test loop-back follow the
// specification; the per-channel offset inputs, the monitor channel selector
// and the ports standing in for the optical links and debug cores are this
// design's choices.
`timescale 1ps / 100fs
module rpc_lb_tdc_top
  import rpc_lb_pkg::*;
#(
  parameter int unsigned NCH = N_CH
) (
  input  logic                    clk_in_p,
  input  logic                    clk_in_n,
  input  logic                    glb_rst,
  input  logic                    isds_rst,
  input  logic [NCH-1:0]          rpc_in,
  input  logic [NCH-1:0][TAP_W-1:0] idelay_tap,
  input  stamp_t [NCH-1:0]        macro_offset,
  // self-test and monitoring
  input  logic                    tp_loopback,
  output logic                    test_pulse_out,
  input  logic [STRIP_W-1:0]      mon_ch_sel,
  input  logic                    fifo_rd_en,
  output logic                    fifo_rd_valid,
  output logic [BX_W-1:0]         fifo_bx_value,
  output logic [SUBBX_W-1:0]      fifo_tdc_value,
  output logic                    fifo_empty,
  output logic                    fifo_full,
  // time stamps
  output logic [BX_W-1:0]         bc_value,
  output logic [NCH-1:0]          new_event,
  output stamp_t [NCH-1:0]        comp_tdc_value,
  // data collection and merging
  output lb_frame_t               lb_frame,
  output logic                    hit_overflow,
  output logic [15:0]             hit_dropped,
  output logic [$clog2(HIT_BUF_DEPTH+1)-1:0] hit_occupancy,
  input  lb_frame_t               slbr_frame,
  input  lb_frame_t               slbl_frame,
  output logic [MLB_FRAME_W-1:0]  mlb_frame,
  output logic                    mlb_frame_valid,
  output logic                    locked
);
  logic clk_40, clk_80, clk_320;   // clk_80 is not used by this logic
  logic clk_160_0, clk_160_90, clk_160_180, clk_160_270;

  mmcm_model u_mmcm (
    .clk_in_p, .clk_in_n,
    .clk_40, .clk_80, .clk_320,
    .clk_160_0, .clk_160_90, .clk_160_180, .clk_160_270,
    .locked
  );

  bx_counter u_bc (
    .clk_40   (clk_40),
    .bc_reset (glb_rst),
    .bc_value (bc_value)
  );

  // ---- self-test pulse ---------------------------------------------------
  test_pulse_generator u_tpg (
    .clk_40    (clk_40),
    .clk_320   (clk_320),
    .rst       (glb_rst),
    .bx_value  (bc_value),
    .word      (),
    .pulse_out (test_pulse_out)
  );

  logic [NCH-1:0] tdc_in;
  always_comb begin
    tdc_in    = rpc_in;
    tdc_in[0] = tp_loopback ? test_pulse_out : rpc_in[0];
  end

  // ---- TDC channels and latency compensation -----------------------------
  logic [NCH-1:0]               raw_event;
  logic [NCH-1:0][SUBBX_W-1:0]  raw_tdc;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    tdc_channel u_tdc (
      .clk_40      (clk_40),
      .clk_160_0   (clk_160_0),
      .clk_160_90  (clk_160_90),
      .clk_160_180 (clk_160_180),
      .clk_160_270 (clk_160_270),
      .isds_rst    (isds_rst),
      .isds_in     (tdc_in[c]),
      .idelay_tap  (idelay_tap[c]),
      .new_event   (raw_event[c]),
      .tdc_out     (raw_tdc[c])
    );

    latency_compensator u_comp (
      .clk_40         (clk_40),
      .rst            (glb_rst),
      .tdc_valid      (raw_event[c]),
      .tdc_value      (raw_tdc[c]),
      .bx_value       (bc_value),
      .macro_offset   (macro_offset[c]),
      .comp_tdc_valid (new_event[c]),
      .comp_tdc_value (comp_tdc_value[c])
    );
  end

  // ---- monitor FIFO ------------------------------------------------------
  stamp_t fifo_dout;

  timestamp_fifo #(.WIDTH(STAMP_W)) u_fifo (
    .clk      (clk_40),
    .rst      (glb_rst),
    .wr_en    (int'(mon_ch_sel) < NCH && new_event[mon_ch_sel]),
    .din      (comp_tdc_value[mon_ch_sel]),
    .rd_en    (fifo_rd_en),
    .rd_valid (fifo_rd_valid),
    .dout     (fifo_dout),
    .empty    (fifo_empty),
    .full     (fifo_full)
  );

  assign fifo_bx_value  = fifo_dout[STAMP_W-1:SUBBX_W];
  assign fifo_tdc_value = fifo_dout[SUBBX_W-1:0];

  // ---- data collection and Master LB frame -------------------------------
  lb_data_collector #(.NCH(NCH)) u_collector (
    .clk       (clk_40),
    .rst       (glb_rst),
    .hit_valid (new_event),
    .hit_time  (comp_tdc_value),
    .frame     (lb_frame),
    .overflow  (hit_overflow),
    .dropped   (hit_dropped),
    .occupancy (hit_occupancy)
  );

  mlb_frame_merger u_merger (
    .clk         (clk_40),
    .rst         (glb_rst),
    .mlb         (lb_frame),
    .slbr        (slbr_frame),
    .slbl        (slbl_frame),
    .frame       (mlb_frame),
    .frame_valid (mlb_frame_valid)
  );

endmodule
