# 96-channel FPGA TDC and hit collector for an RPC Link Board

Resistive Plate Chamber (RPC) strips produce asynchronous pulses about 100 ns
long. Only the rising edge carries timing. A Link Board receives 96 strips. It
has to stamp every rising edge with the bunch crossing (BX, 25 ns) in which it
arrived and with a fine time inside that crossing. It then packs the hits into
fixed-size frames that leave the board once per crossing.

This RTL does the stamping without a delay-line TDC. Four 160 MHz clocks,
90 degrees apart, sample each input with the FPGA's input deserialiser. That
gives 16 samples per crossing, 1.5625 ns apart. The position of the first
0→1 transition among those 16 samples is the 4-bit *sub-BX* fine time. A 15-bit
BX counter gives the coarse time. Together they form a 19-bit stamp
`{bx[14:0], sub[3:0]}`.

The sampling chain adds a fixed delay, and so do the cables and the clock
distribution. Each channel removes it in two ways:

* a whole number of 1.5625 ns *macro steps*, subtracted from the stamp;
* 48 ps *micro steps* of the input delay, applied before sampling.

```
                    +-------------------------- tdc_channel (x96) --------------------------+
 rpc_in[c] --+----->| idelay_model -> iserdes_oversampler -> iserdes_readout               |--> new_event, sub-BX
 test pulse -+ (c=0)|  tap x 48 ps     4 phases x 160 MHz     5x4-bit shift, 16-bit window,  |
                    |                                         16->4 encoder, event detector |
                    +------------------------------------------------------------------------+
 bx_counter (15 bit) ---------------------------------------------------+
                                                                        v
                                   latency_compensator (x96): {bx, sub} - macro_offset[c]
                                                                        |
                     +--------------------------------------------------+----------------+
                     v                                                                   v
      lb_data_collector: 42-hit buffer, 6 hits/BX  ->  lb_frame (78 bit)         timestamp_fifo (monitor channel)
                     |
                     v
      mlb_frame_merger: right slave + own + left slave  ->  mlb_frame (256 bit)

 mmcm_model: clk_40, clk_80, clk_320, clk_160_{0,90,180,270}, locked
 test_pulse_generator: pulses at BX 500 and 1500, serialised at 320 MHz
```

## From edge to sub-BX

`iserdes_oversampler` samples the input on the rising edges of the 0, 90, 180
and 270 degree clocks. On every phase-0 edge it delivers the four samples of
the 160 MHz period that just ended, with the earliest sample in bit 0. A rising
input therefore looks like a thermometer code:

| edge falls in quarter | word (bit 3..0) |
|---|---|
| 1 (0–1.56 ns) | `1110` |
| 2 | `1100` |
| 3 | `1000` |
| 4 | `0000`, then `1111` |

`iserdes_readout` shifts these words into five 4-bit stages on `clk_160_0`,
so it always holds the last 20 samples in time order. On each `clk_40` edge it
captures two things:

* the newest 16 samples, which are the crossing that just ended;
* the sample just before them, taken from the fifth stage.

With the sample before the window, an edge exactly on the crossing boundary
(sub-BX 0) is still seen as a 0→1 transition. One `clk_40` cycle later the
encoder reports two outputs:

* `new_event`: at least one transition is in the window;
* `tdc_out`: the position 0..15 of the first transition.

An input that is already high when the window starts gives no event. A long
pulse is therefore reported once, and a second edge in the same crossing is
ignored.

`clk_40` and `clk_160_0` come from one clock manager, and their rising edges
coincide. The 40 MHz capture reads the 160 MHz registers as an ordinary
synchronous transfer.

## Latency and its compensation

With no cable delay and no delay taps, the raw stamp of a hit that arrives in
sub-BX *k* of crossing *b* is `16*b + k + L`. In simulation, L is 41 steps
(2.56 crossings). It is made up of:

* one 160 MHz cycle in the sampler;
* one in the shift register;
* the window and encoder registers;
* the BX count moving on meanwhile.

L is the same for every edge position, so the transfer function has unit gain
and only an offset. `latency_compensator` subtracts `macro_offset[c]` modulo
2^19. If that offset is L plus the channel's cable delay in steps, the output
is the true `{bx, sub}` of the hit.

A skew that is not a whole number of steps is trimmed with `idelay_tap[c]`. Each
tap adds 48 ps, and 31 taps add 1.49 ns. The tap shifts the input edge across
the sampling instants. Offsets are run-time inputs, because cable lengths differ
from strip to strip.

`rtl/latency_compensator.sv` registers its result. `new_event[c]` and
`comp_tdc_value[c]` at the top therefore appear about 3 crossings after the
edge.

## Collecting hits: 42 in, 6 out per crossing

`lb_data_collector` works on `clk_40`. Each cycle, every channel may present
one compensated stamp. The new hits are handled like this:

* **Write.** New hits are written in channel order into a circular buffer of
  42 entries. An entry holds the strip number (channel + 1, so 1..96), the
  sub-BX and the 15-bit BX. The write side compacts up to 96 valid inputs into
  consecutive slots. This uses a prefix count per channel and an AND-OR
  selection per slot, not 96 write ports.
* **Read.** In the same cycle up to 6 entries leave from the head of the
  buffer. They must all carry the same BX as the head entry, so that each
  frame describes exactly one crossing.
* **Frame.** The hits fill `lb_frame.hits[5]` ("hit 1") downwards. Unused
  slots have strip number 0. `lb_frame.bx` is the low 12 bits of that
  crossing's BX, and `lb_frame.valid` marks a frame with hits.

A burst larger than 6 hits drains over the following crossings, and those hits
are sent late but not lost. Space freed by the current cycle's frame is reused
at once. Hits that still do not fit are dropped. They raise `hit_overflow` for
one cycle and add to `hit_dropped`. A hit presented in cycle *n* can leave in
the frame registered at the end of cycle *n+1*.

Link Board frame, 78 bits (`lb_frame_t` adds a valid bit on top):

| bits | field |
|---|---|
| 77:67 | hit 1: strip (7) + sub-BX (4) |
| … | hits 2..5 |
| 22:12 | hit 6 |
| 11:0 | BX number |

## Master Link Board frame

One board of three acts as master. `mlb_frame_merger` takes its own frame and
the frames of the right and left slave boards, which arrive over optical links
outside this RTL and enter as the ports `slbr_frame` and `slbl_frame`. It then
registers one 256-bit frame per crossing:

| bits | field |
|---|---|
| 255:254 | header, `2'b01` |
| 253:234 | FEC, left 0 for an external encoder |
| 233:168 | right slave hits (6 × 11) |
| 167:102 | own hits |
| 101:36 | left slave hits |
| 35:24 | BCN of the master board |
| 23:18 | right slave BX − master BX, signed, saturated to −32..31, 0 if no hits |
| 17:12 | left slave BX − master BX, same rules |
| 11:0 | unused, 0 |

At 40 MHz this is 10.24 Gb/s. The frame holds 18 hits per crossing, 6 from
each board.

## Self-test and monitoring

`test_pulse_generator` watches the BX counter. When the counter reads 500, it
sends a word with its edge at the start of the crossing (`8'hFF`). When it
reads 1500, it sends a word with the edge one 3.125 ns bit later (`8'hFE`).
After each word the line stays high for three more crossings, which makes a
100 ns pulse like a real hit.

`oserdes_model` serialises the word at 320 MHz, bit 0 first. With
`tp_loopback = 1` the pulse replaces `rpc_in[0]`. The two stamps on channel 0
must then differ by exactly 1000 × 16 + 2 steps.

`timestamp_fifo` (16 × 19 bits) keeps the compensated stamps of the channel
chosen by `mon_ch_sel`. `fifo_rd_en` reads them out.

## Clocks and resets

`mmcm_model` turns the 40 MHz differential reference into these clocks:

* `clk_40`, `clk_80` and `clk_320`;
* the four 160 MHz phases.

All of them start aligned once `locked` rises, and `clk_80` is unused.

There are two resets, both synchronous and active high:

* `isds_rst` clears the sampling and readout;
* `glb_rst` clears the BX counter, the compensators, the collector, the merger,
  the FIFO and the test pulse generator.

## Synthesizable logic and models

Four files stand in for hard blocks of the FPGA. They are simulation models and
must be replaced by the vendor primitives for an implementation:

* `mmcm_model`: clock manager, uses delays;
* `idelay_model`: input delay, uses a transport delay;
* `iserdes_oversampler`: input deserialiser. It is written as flip-flops on
  four clocks, but in hardware it is the primitive;
* `oserdes_model`: output serialiser.

Everything else is synthesizable: `iserdes_readout`, `bx_counter`,
`latency_compensator`, `timestamp_fifo`, `test_pulse_generator` (apart from its
serialiser), `lb_data_collector`, `mlb_frame_merger` and the top
`rpc_lb_tdc_top`. Types and widths live in `rpc_lb_pkg`.

## Parameters

| name | default | meaning |
|---|---|---|
| `N_CH` / `NCH` | 96 | channels per board |
| `BX_W` | 15 | BX counter width |
| `SUBBX_W` | 4 | fine time width (16 samples per crossing) |
| `HIT_BUF_DEPTH` / `DEPTH` | 42 | collector buffer |
| `HITS_PER_FRAME` | 6 | hits per board frame |
| `FRAME_BX_W` | 12 | BX field in a board frame |
| `RBCN_W` | 6 | slave BX difference field |
| `TAP_W`, `TAP_PS` | 5, 48 | micro-step delay |
| `FIRST_BX`, `SECOND_BX` | 500, 1500 | test pulse crossings |
| `PULSE_BX` | 4 | test pulse length in crossings |
| `timestamp_fifo.DEPTH` | 16 | monitor FIFO depth |

## Where this RTL goes beyond, or differs from, the published description

The published description of the board gives the block structure, the widths,
the sampling scheme and the frame layouts. The following are choices made here:

* **Hits per board frame.** The description says 7 hits per board and 21 to the
  trigger in one place, and 17 in another. Its frame drawings give 6 per board
  (66 bits), and 6 is used here. A 256-bit frame holds 18 hits, not 21.
* **Thermometer words.** One of the four example sampler words in the
  description (`1010` for an edge in the second quarter) is not a thermometer
  code. The sampler here produces `1100` there.
* **Readout details.** These are this design's own: the fifth shift stage used
  as the "sample before the window", the first-edge encoding, and the rule that
  an input already high produces no event.
* **One crossing per frame.** A frame carries the hits of one crossing only.
  There is no ordering among channels other than channel number. Overflow drops
  the newest hits and counts them. Empty slots have strip 0.
* **Merger fields.** The header value `01`, RBCN saturation, and zero FEC and
  pad bits are choices made here. The FEC code is not specified.
* **Offsets.** There is one run-time macro offset and one tap per channel. No
  calibration procedure is built in. The end-to-end testbench shows one:
  measure L from a hit with zero offset.
* **Test pulses.** The description shows 16-character patterns next to an
  8-bit bus into the serialiser. The 8-bit bus is followed: one word per
  crossing at 320 MHz. The pulse length (4 crossings) is this design's own.
* **FIFO depth.** The FIFO depth is 16.
* **One test output.** The board drives 24 test outputs towards the front-end
  boards. This RTL has one serial test pulse output, `test_pulse_out`. How it
  fans out to the 24 outputs is not described, so that is left to the board.
* **Resolution.** The resolution is quoted in several places as 1.5, 1.52 or
  1.56 ns. Here it is exactly 25 ns / 16 = 1.5625 ns, set by the four 160 MHz
  phases.
* **Not included.** The optical (GBT) links, the FEC encoder, histograms and
  data logging, the DDR3 buffer, TMR/scrubbing, the control board, the LVDS
  receivers and the protection circuits are not part of this RTL.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rpc_lb_tdc_top \
    rtl/rpc_lb_pkg.sv tb/tb_rpc_lb_tdc_top.sv -o sim
./obj_dir/sim
```

Replace the top module name to run another testbench. Verilator finds the other
files through `-Irtl -Itb`.

| testbench | what it checks |
|---|---|
| `tb_rpc_lb_tdc_top` | Full design with default parameters (96 channels), about 1550 crossings. It covers latency calibration, skew compensation on all channels (macro and micro steps), bursts that are sent late, a 95-hit overflow, test pulse loop-back (1000 × 16 + 2 steps), the monitor FIFO and the master frame. Each mechanism must occur. |
| `tb_tdc_channel` | One channel with the clock model. It checks the constant offset over 120 random edges, every sub-BX value, and a one-step shift from 5 taps. |
| `tb_iserdes_readout` | Random sample streams against the expected first edge of each window. Some windows hold several edges. |
| `tb_iserdes_oversampler` | Sample order and thermometer words. |
| `tb_lb_data_collector` | Queue model of the buffer. It checks frames, overflow, dropped count and occupancy. |
| `tb_mlb_frame_merger` | Every field of the 256-bit frame, including saturation. |
| `tb_bx_counter`, `tb_latency_compensator`, `tb_timestamp_fifo`, `tb_test_pulse_generator`, `tb_idelay_model`, `tb_oserdes_model`, `tb_mmcm_model` | The block named. |

The full-size testbench runs in well under a minute.
