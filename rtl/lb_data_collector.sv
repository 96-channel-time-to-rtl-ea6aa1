// lb_data_collector -- gathers the time-stamped hits of all channels of a Link
// Board and sends them out, HITS_PER_FRAME per bunch crossing.
//
// Every clk_40 cycle each channel may present one compensated stamp
// {bx[14:0], sub[3:0]}. All presented hits are written, in channel order, into
// a circular buffer of DEPTH (42) entries, each holding the strip number
// (channel + 1, 1..96), the sub-BX and the 15-bit BX. In the same cycle up to
// HITS_PER_FRAME (6) entries are taken from the head of the buffer, but only
// those with the same BX as the head entry, so every frame describes a single
// crossing and its 12-bit BX field applies to all its hits. Frame slots are
// filled from the most significant one ("Hit 1") down; an unused slot has strip
// number 0. A burst of up to 42 hits is thus absorbed and sent over the
// following crossings; hits beyond the free space are dropped, which pulses
// overflow and adds to the dropped counter.
//
// Timing: a hit presented in cycle n can appear in the frame registered at the
// end of cycle n+1 (one cycle in the buffer, one output register). The frame is
// registered; frame.valid marks frames that carry at least one hit.
// The buffer size, the hit and frame formats follow the specification; the
// one-BX-per-frame rule, the empty-slot code, channel-order priority and the
// drop policy are this design's choices.
`timescale 1ps / 100fs
module lb_data_collector
  import rpc_lb_pkg::*;
#(
  parameter int unsigned NCH   = N_CH,
  parameter int unsigned DEPTH = HIT_BUF_DEPTH,
  parameter int unsigned NOUT  = HITS_PER_FRAME
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [NCH-1:0]      hit_valid,
  input  stamp_t [NCH-1:0]    hit_time,
  output lb_frame_t           frame,
  output logic                overflow,
  output logic [15:0]         dropped,
  output logic [$clog2(DEPTH+1)-1:0] occupancy
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);
  localparam int unsigned NW = $clog2(NCH+1);

  initial begin
    assert (NOUT == HITS_PER_FRAME) else $error("frame format holds HITS_PER_FRAME hits");
    assert (NCH < 2**STRIP_W) else $error("strip number field too narrow");
  end

  buf_hit_t       mem [DEPTH];
  logic [PW-1:0]  rd_ptr, wr_ptr;
  logic [CW-1:0]  count;

  function automatic logic [PW-1:0] wrap(input int unsigned x);
    return (x >= DEPTH) ? PW'(x - DEPTH) : PW'(x);
  endfunction

  // ---- read side: up to NOUT hits of the head crossing -------------------
  buf_hit_t          head;
  logic [NOUT-1:0]   take;
  logic              run;
  buf_hit_t [NOUT-1:0] cand;
  logic [CW-1:0]     n_pop;
  lb_frame_t         next_frame;

  always_comb begin
    head       = mem[rd_ptr];
    n_pop      = '0;
    next_frame = '0;
    run        = 1'b1;
    for (int k = 0; k < NOUT; k++) begin
      cand[k] = mem[wrap(int'(rd_ptr) + k)];
      run     = run && (CW'(k) < count) && (cand[k].bx == head.bx);
      take[k] = run;
      if (take[k]) begin
        n_pop = n_pop + 1'b1;
        next_frame.hits[NOUT-1-k] = '{strip: cand[k].strip, subbx: cand[k].subbx};
      end
    end
    next_frame.valid = (count != '0);
    next_frame.bx    = (count != '0) ? head.bx[FRAME_BX_W-1:0] : '0;
  end

  // ---- write side: all new hits in channel order, as far as space allows --
  // offs[i] is the number of hits on lower channels; the k-th new hit
  // (k = offs[i]) is routed to compact[k] and from there to buffer slot
  // wr_ptr + k.
  logic [CW-1:0]            space;
  logic [NW-1:0]            offs [NCH];
  logic [NW-1:0]            n_new;
  logic [CW-1:0]            n_push;
  buf_hit_t                 compact [DEPTH];

  always_comb begin
    space = CW'(DEPTH) - count + n_pop;
    n_new = '0;
    for (int i = 0; i < NCH; i++) begin
      offs[i] = n_new;
      if (hit_valid[i]) n_new = n_new + 1'b1;
    end
    n_push = (int'(n_new) < int'(space)) ? CW'(n_new) : space;
  end

  // at most one channel matches a given k, so the selection is an AND-OR
  for (genvar k = 0; k < DEPTH; k++) begin : g_compact
    always_comb begin
      compact[k] = '0;
      for (int i = 0; i < NCH; i++)
        if (hit_valid[i] && int'(offs[i]) == k)
          compact[k] = compact[k] | buf_hit_t'({STRIP_W'(i + 1), hit_time[i][SUBBX_W-1:0], hit_time[i][STAMP_W-1:SUBBX_W]});
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < DEPTH; j++) begin
      if (slot_k(j) < int'(n_push)) mem[j] <= compact[slot_k(j)];
    end
  end

  // position, in this cycle's list of new hits, of the hit that goes to slot j
  function automatic int slot_k(input int j);
    return (j >= int'(wr_ptr)) ? j - int'(wr_ptr) : j + int'(DEPTH) - int'(wr_ptr);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      frame    <= '0;
      overflow <= 1'b0;
      dropped  <= '0;
    end else begin
      rd_ptr   <= wrap(int'(rd_ptr) + int'(n_pop));
      wr_ptr   <= wrap(int'(wr_ptr) + int'(n_push));
      count    <= count - n_pop + n_push;
      frame    <= next_frame;
      overflow <= (int'(n_new) > int'(n_push));
      if (int'(n_new) > int'(n_push))
        dropped <= dropped + 16'(int'(n_new) - int'(n_push));
    end
  end

  assign occupancy = count;

  // The buffer never holds more than DEPTH hits.
  always_ff @(posedge clk) begin
    if (!rst) assert (count <= CW'(DEPTH)) else $error("hit buffer count out of range");
  end

endmodule
