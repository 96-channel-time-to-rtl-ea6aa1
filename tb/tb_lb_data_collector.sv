// tb_lb_data_collector -- drives all 96 channels with random light traffic,
// bursts that must be spread over several crossings, and bursts larger than the
// 42-hit buffer. A queue model of the buffer predicts every frame (up to 6
// hits, all of the head hit's crossing, strip = channel + 1, empty slots 0),
// the overflow pulse and the dropped-hit count. Counts how often a burst was
// delayed, a frame was cut short by a change of crossing, and the buffer
// overflowed; each must happen.
`timescale 1ps / 100fs
module tb_lb_data_collector;
  import rpc_lb_pkg::*;
  int checks = 0, failures = 0;
  localparam int NCH = 96, DEPTH = 42, NOUT = 6;
  logic clk = 0, rst = 1;
  logic [NCH-1:0] hv = '0;
  stamp_t [NCH-1:0] ht = '0;
  lb_frame_t frame;
  logic overflow;
  logic [15:0] dropped;
  logic [5:0] occ;

  buf_hit_t q[$];
  lb_frame_t exp_frame;
  logic exp_ovf;
  int exp_dropped = 0;
  int n_delayed = 0, n_split = 0, n_overflow = 0, n_full_frames = 0;

  lb_data_collector #(.NCH(NCH), .DEPTH(DEPTH), .NOUT(NOUT)) dut (
    .clk, .rst, .hit_valid(hv), .hit_time(ht), .frame, .overflow, .dropped, .occupancy(occ));

  always #12500 clk = ~clk;

  initial begin
    #(25000 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npop, space, nnew, nacc, pct;
    buf_hit_t h;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // stimulus
      case (cyc % 100)
        10: pct = 30;     // ~29 hits: spread over 5 crossings
        50: pct = 70;     // ~67 hits: overflows the buffer
        default: pct = 1;
      endcase
      for (int c = 0; c < NCH; c++) begin
        hv[c] = ($urandom % 100) < pct;
        ht[c] = {BX_W'(cyc + 1000 - ((cyc % 10 == 3 && $urandom % 2 == 0) ? 1 : 0)), SUBBX_W'($urandom)};
      end
      // model: read side
      exp_frame = '0;
      npop = 0;
      if (q.size() > 0) begin
        exp_frame.valid = 1;
        exp_frame.bx = q[0].bx[FRAME_BX_W-1:0];
        while (npop < NOUT && npop < q.size() && q[npop].bx == q[0].bx) begin
          exp_frame.hits[NOUT-1-npop] = '{strip: q[npop].strip, subbx: q[npop].subbx};
          npop++;
        end
        if (q.size() > npop && npop < NOUT) n_split++;
        if (q.size() > NOUT) n_delayed++;
        if (npop == NOUT) n_full_frames++;
      end
      for (int k = 0; k < npop; k++) void'(q.pop_front());
      // model: write side
      space = DEPTH - q.size();
      nnew = 0; nacc = 0;
      for (int c = 0; c < NCH; c++) if (hv[c]) begin
        nnew++;
        if (nacc < space) begin
          h.strip = STRIP_W'(c + 1); h.subbx = ht[c][3:0]; h.bx = ht[c][18:4];
          q.push_back(h);
          nacc++;
        end
      end
      exp_ovf = nnew > nacc;
      if (exp_ovf) n_overflow++;
      exp_dropped += nnew - nacc;
      @(posedge clk); #1;
      checks++;
      if (frame !== exp_frame) begin
        failures++;
        if (failures < 10) $display("cyc %0d: frame %h expected %h", cyc, frame, exp_frame);
      end
      checks++;
      if (overflow !== exp_ovf || int'(dropped) != exp_dropped) begin
        failures++; $display("cyc %0d: overflow %b/%b dropped %0d/%0d", cyc, overflow, exp_ovf, dropped, exp_dropped);
      end
      checks++;
      if (int'(occ) != q.size()) begin failures++; $display("cyc %0d: occupancy %0d expected %0d", cyc, occ, q.size()); end
    end
    $display("delayed %0d split %0d overflow %0d full frames %0d dropped %0d", n_delayed, n_split, n_overflow, n_full_frames, exp_dropped);
    checks += 3;
    if (n_delayed == 0)  begin failures++; $display("no delayed burst"); end
    if (n_split == 0)    begin failures++; $display("no frame cut by crossing change"); end
    if (n_overflow == 0) begin failures++; $display("no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
