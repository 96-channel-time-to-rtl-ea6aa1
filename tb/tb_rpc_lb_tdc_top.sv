// tb_rpc_lb_tdc_top -- end-to-end test of the Link Board time stamping and
// data collection at full size (96 channels, all defaults).
//
// 1. Calibration: with all offsets 0 one hit gives the chain's fixed latency L
//    (in 1.5625 ns steps) as raw stamp minus ideal stamp.
// 2. Every channel c then gets a cable skew of (c mod 3) steps, applied by the
//    tb to its input, and macro_offset = L + skew; channel 7 instead gets a
//    240 ps skew corrected by 5 micro-step taps. Groups of hits are placed
//    at known sub-BX positions; every compensated stamp must equal the ideal
//    {BX, sub-BX} of the hit time.
// 3. Bursts of ~30 hits (more than 6 per crossing, delayed transmission) and
//    one burst on 95 channels (buffer overflow) are sent. Every hit leaving
//    in a Link Board frame must match a stamped hit, and stamped = sent +
//    dropped.
// 4. Test pulses loop back into channel 0: the two stamps must be
//    1000 crossings + 2 steps apart and both must come out of the monitor FIFO.
// 5. The Master LB frame must carry the right slave, own and left slave hit
//    blocks and the own BCN of the previous cycle.
// Each mechanism is counted and must occur at least once.
`timescale 1ps / 100fs
module tb_rpc_lb_tdc_top;
  import rpc_lb_pkg::*;
  int checks = 0, failures = 0;
  localparam realtime DT = 1562.5;
  localparam int NCH = N_CH;

  logic clk_p = 0;
  logic glb_rst = 1, isds_rst = 1;
  logic [NCH-1:0] rpc_in = '0;
  logic [NCH-1:0][TAP_W-1:0] idelay_tap = '0;
  stamp_t [NCH-1:0] macro_offset = '0;
  logic tp_loopback = 1;
  logic test_pulse_out;
  logic [STRIP_W-1:0] mon_ch_sel = '0;
  logic fifo_rd_en = 0, fifo_rd_valid, fifo_empty, fifo_full;
  logic [BX_W-1:0] fifo_bx_value, bc_value;
  logic [SUBBX_W-1:0] fifo_tdc_value;
  logic [NCH-1:0] new_event;
  stamp_t [NCH-1:0] comp_tdc_value;
  lb_frame_t lb_frame, slbr_frame = '0, slbl_frame = '0;
  logic hit_overflow;
  logic [15:0] hit_dropped;
  logic [5:0] hit_occupancy;
  logic [MLB_FRAME_W-1:0] mlb_frame;
  logic mlb_frame_valid, locked;

  rpc_lb_tdc_top dut (
    .clk_in_p(clk_p), .clk_in_n(~clk_p), .glb_rst, .isds_rst, .rpc_in, .idelay_tap, .macro_offset,
    .tp_loopback, .test_pulse_out, .mon_ch_sel, .fifo_rd_en, .fifo_rd_valid, .fifo_bx_value,
    .fifo_tdc_value, .fifo_empty, .fifo_full, .bc_value, .new_event, .comp_tdc_value,
    .lb_frame, .hit_overflow, .hit_dropped, .hit_occupancy, .slbr_frame, .slbl_frame,
    .mlb_frame, .mlb_frame_valid, .locked);

  always #12500 clk_p = ~clk_p;

  initial begin
    #(25000.0 * 2200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- observation -------------------------------------------
  int unsigned cur_bx;             // BX counter value in the current crossing
  realtime     cur_t;              // start of the current crossing
  stamp_t      exp_q [NCH][$];     // expected stamps per channel
  stamp_t      raw_q [$];          // stamps seen while calibrating
  stamp_t      ch0_stamps [$];
  int          sent_stamped [logic [STAMP_W+STRIP_W-1:0]];
  int n_stamped = 0, n_framed = 0, n_ok_stamp = 0, n_micro = 0, n_skewed = 0;
  int n_delayed = 0, n_overflow = 0, n_tp = 0, n_fifo = 0, n_mlb = 0;
  bit calibrating = 1;
  lb_frame_t prev_lb, prev_r, prev_l;
  bit prev_rst = 1;

  always @(posedge dut.clk_40) begin
    #1;
    cur_bx = bc_value;
    cur_t  = $realtime - 1;
    for (int c = 0; c < NCH; c++) if (new_event[c]) begin
      n_stamped++;
      sent_stamped[{STRIP_W'(c + 1), comp_tdc_value[c]}]++;
      if (c == 0 && tp_loopback) ch0_stamps.push_back(comp_tdc_value[c]);
      else if (calibrating) raw_q.push_back(comp_tdc_value[c]);
      else begin
        checks++;
        if (exp_q[c].size() == 0) begin
          failures++; $display("ch %0d: unexpected stamp %h", c, comp_tdc_value[c]);
        end else begin
          stamp_t e;
          e = exp_q[c].pop_front();
          if (comp_tdc_value[c] !== e) begin
            failures++;
            if (failures < 20) $display("ch %0d: stamp %0d:%0d expected %0d:%0d", c,
              comp_tdc_value[c][18:4], comp_tdc_value[c][3:0], e[18:4], e[3:0]);
          end else begin
            n_ok_stamp++;
            if (c == 7) n_micro++;
            if (c % 3 != 0) n_skewed++;
          end
        end
      end
    end
    // Link Board frame
    if (lb_frame.valid) begin
      int nh;
      nh = 0;
      for (int k = 0; k < HITS_PER_FRAME; k++) begin
        hit_t h;
        h = lb_frame.hits[k];
        if (h.strip != 0) begin
          logic [STAMP_W+STRIP_W-1:0] key;
          bit found;
          found = 0;
          nh++;
          n_framed++;
          // the frame carries 12 BX bits; find the stamped hit they belong to
          foreach (sent_stamped[kk]) if (!found && sent_stamped[kk] > 0 &&
              kk[STAMP_W+STRIP_W-1:STAMP_W] == h.strip && kk[3:0] == h.subbx &&
              kk[15:4] == lb_frame.bx) begin
            key = kk; found = 1;
          end
          checks++;
          if (!found) begin failures++; $display("frame hit strip %0d sub %0d bx %0d not stamped", h.strip, h.subbx, lb_frame.bx); end
          else sent_stamped[key]--;
        end
      end
      if (nh == HITS_PER_FRAME && hit_occupancy > 0) n_delayed++;
    end
    if (hit_overflow) n_overflow++;
    // Master LB frame of the previous cycle's inputs
    if (!glb_rst && !prev_rst) begin
      checks++;
      if (mlb_frame[233:168] !== prev_r.hits || mlb_frame[167:102] !== prev_lb.hits ||
          mlb_frame[101:36] !== prev_l.hits || mlb_frame[35:24] !== prev_lb.bx) begin
        failures++; $display("master frame mismatch");
      end else if (prev_lb.valid && prev_r.valid && prev_l.valid) n_mlb++;
    end
    // new slave frames, sampled by the merger at the next edge
    slbr_frame = {$urandom, $urandom, $urandom};
    slbl_frame = {$urandom, $urandom, $urandom};
    slbr_frame.bx = lb_frame.bx + 12'($urandom % 5);
    slbl_frame.bx = lb_frame.bx - 12'($urandom % 5);
    prev_lb = lb_frame; prev_r = slbr_frame; prev_l = slbl_frame;
    prev_rst = glb_rst;
  end

  // ---------------- stimulus ----------------------------------------------
  int skew_steps [NCH];
  realtime skew_ps [NCH];

  // pulse of 100 ns on channel c whose true arrival is cur_t + x
  task automatic hit(input int c, input realtime x, input bit record);
    realtime t;
    int k;
    t = cur_t + x;
    k = int'($floor(x / DT));
    if (record) exp_q[c].push_back({BX_W'(cur_bx), SUBBX_W'(k)});
    fork
      begin
        #(t + skew_ps[c] - $realtime);
        rpc_in[c] = 1;
        #100000;
        rpc_in[c] = 0;
      end
    join_none
  endtask

  task automatic group(input int nhits, input bit record);
    int used [NCH];
    @(posedge dut.clk_40); #2;
    for (int n = 0; n < nhits; n++) begin
      int c;
      do c = 1 + $urandom % (NCH - 1); while (used[c]);
      used[c] = 1;
      if (c == 7) hit(c, ($urandom % 16 + 1) * DT - 100.0, record);
      else        hit(c, ($urandom % 16) * DT + DT / 2, record);
    end
    repeat (8) @(posedge dut.clk_40);
  endtask

  initial begin
    int lat;
    for (int c = 0; c < NCH; c++) begin skew_steps[c] = 0; skew_ps[c] = 0; end
    idelay_tap[0] = 5'd8;        // keep the loop-back edge away from the sampling instants
    @(posedge locked);
    repeat (10) @(posedge dut.clk_40);
    #1 isds_rst = 0;
    repeat (4) @(posedge dut.clk_40);
    #1 glb_rst = 0;
    repeat (4) @(posedge dut.clk_40);

    // 1. calibration on channel 10
    @(posedge dut.clk_40); #2;
    hit(10, 5 * DT + DT / 2, 0);
    begin
      int unsigned cb; cb = cur_bx;
      repeat (8) @(posedge dut.clk_40);
      checks++;
      if (raw_q.size() != 1) begin
        failures++; $display("calibration: %0d stamps", raw_q.size()); lat = 0;
      end else lat = int'(raw_q[0]) - int'(cb * 16 + 5);
    end
    $display("chain latency %0d steps of 1.5625 ns", lat);
    checks++;
    if (lat <= 0 || lat > 16 * 8) begin failures++; $display("implausible latency"); end

    // 2. skews and their compensation
    for (int c = 1; c < NCH; c++) begin
      skew_steps[c] = c % 3;
      skew_ps[c]    = skew_steps[c] * DT;
      macro_offset[c] = stamp_t'(lat + skew_steps[c]);
    end
    // channel 7: no cable skew, but 5 micro-step taps (240 ps) move its edges,
    // placed 100 ps before a sampling instant, one step later; the offset
    // removes that step again
    skew_ps[7] = 0.0;
    idelay_tap[7] = 5'd5;
    macro_offset[7] = stamp_t'(lat + 1);
    calibrating = 0;
    repeat (2) @(posedge dut.clk_40);

    for (int g = 0; g < 20; g++) group(1 + $urandom % 5, 1);
    hit_once_on_7();
    // 3. bursts
    for (int g = 0; g < 4; g++) group(28 + $urandom % 8, 1);
    group(95, 1);
    repeat (30) @(posedge dut.clk_40);

    // 4. test pulses at BX 500 and 1500
    wait (bc_value > 1520);
    repeat (10) @(posedge dut.clk_40);
    checks++;
    if (ch0_stamps.size() != 2) begin failures++; $display("loop-back stamps: %0d", ch0_stamps.size()); end
    else begin
      checks++;
      if (int'(ch0_stamps[1]) - int'(ch0_stamps[0]) != 1000 * 16 + 2) begin
        failures++; $display("test pulse spacing %0d", int'(ch0_stamps[1]) - int'(ch0_stamps[0]));
      end else n_tp++;
    end
    // monitor FIFO holds the channel 0 stamps
    for (int i = 0; i < 3; i++) begin
      @(posedge dut.clk_40); #2 fifo_rd_en = 1;
      @(posedge dut.clk_40); #2 fifo_rd_en = 0;
      if (i < ch0_stamps.size()) begin
        checks++;
        if (!fifo_rd_valid || {fifo_bx_value, fifo_tdc_value} !== ch0_stamps[i]) begin
          failures++; $display("fifo word %0d: %b %h", i, fifo_rd_valid, {fifo_bx_value, fifo_tdc_value});
        end else n_fifo++;
      end
    end
    checks++; if (!fifo_empty) begin failures++; $display("fifo not empty"); end

    // totals
    checks++;
    for (int c = 0; c < NCH; c++) if (exp_q[c].size() != 0) begin
      failures++; $display("ch %0d: %0d stamps missing", c, exp_q[c].size()); break;
    end
    checks++;
    if (n_framed + int'(hit_dropped) != n_stamped) begin
      failures++; $display("framed %0d + dropped %0d != stamped %0d", n_framed, hit_dropped, n_stamped);
    end
    $display("stamps ok %0d (skewed %0d, micro-step %0d), framed %0d, dropped %0d, delayed frames %0d, overflows %0d, test pulse %0d, fifo %0d, master frames %0d",
      n_ok_stamp, n_skewed, n_micro, n_framed, hit_dropped, n_delayed, n_overflow, n_tp, n_fifo, n_mlb);
    checks += 8;
    if (n_ok_stamp == 0) failures++;
    if (n_skewed == 0)   begin failures++; $display("no skew compensation"); end
    if (n_micro == 0)    begin failures++; $display("no micro-step compensation"); end
    if (n_delayed == 0)  begin failures++; $display("no delayed transmission"); end
    if (n_overflow == 0) begin failures++; $display("no overflow"); end
    if (n_tp == 0)       begin failures++; $display("no test pulse loop-back"); end
    if (n_fifo == 0)     begin failures++; $display("no monitor FIFO read"); end
    if (n_mlb == 0)      begin failures++; $display("no full master frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a hit on channel 7 only: 100 ps before a sampling instant, 5 taps late
  task automatic hit_once_on_7();
    @(posedge dut.clk_40); #2;
    hit(7, 9 * DT - 100.0, 1);
    repeat (8) @(posedge dut.clk_40);
  endtask
endmodule
