// mmcm_model -- behavioural model (not synthesizable) of the FPGA clock manager
// that feeds the time-to-digital converter.
//
// From the 40 MHz bunch-crossing reference on clk_in_p/clk_in_n it produces the
// 40 MHz BX clock, 80 MHz and 320 MHz clocks, and four 160 MHz clocks shifted by
// 0, 90, 180 and 270 degrees (1.5625 ns apart). Together the four phases give 16
// sampling instants per 25 ns crossing. The set of outputs follows the
// specification; the lock delay and the way the clocks are formed are this
// model's own.
//
// How it works: each doubling XORs a 50 % duty clock with a copy of itself
// delayed by a quarter of its period: the 40 MHz reference gives 80 MHz, that
// gives 160 MHz, that gives 320 MHz, all with a rising edge on every rising
// edge of the reference. The 90 degree phase is the 160 MHz clock delayed by
// 1.5625 ns; 180 and 270 degrees are the inverses of 0 and 90. The outputs are
// held low until `locked`, which rises on the LOCK_CYCLES-th rising edge of
// clk_in_p; each phase is released at its own first rising edge after that, so
// no output starts with a short pulse. The reference must be a 50 % duty,
// 25 ns clock; the outputs follow it edge for edge. Synthesis ignores the
// delays and so sees clk_80, clk_320 and the 160 MHz outputs as constant: the
// model is meant for simulation, the real part is the vendor primitive.
`timescale 1ps / 100fs
module mmcm_model #(
  parameter int unsigned LOCK_CYCLES = 8
) (
  input  logic clk_in_p,
  input  logic clk_in_n,
  output logic clk_40,
  output logic clk_80,
  output logic clk_320,
  output logic clk_160_0,
  output logic clk_160_90,
  output logic clk_160_180,
  output logic clk_160_270,
  output logic locked
);
  localparam realtime T40  = 25000.0;
  localparam realtime T160 = 6250.0;
  localparam int unsigned CW = $clog2(LOCK_CYCLES + 1);

  // clk_in_n is the complementary leg of the reference; the model times
  // itself from clk_in_p alone.

  logic ref_d, x80, x80_d, x160, x160_d, x160_90, x320;
  logic lock_q = 1'b0;
  logic lock_90, lock_180, lock_270;
  logic [CW-1:0] n_edges = '0;

  assign #(T40 / 4.0)   ref_d   = clk_in_p;
  assign                x80     = clk_in_p ^ ref_d;
  assign #(T40 / 8.0)   x80_d   = x80;
  assign                x160    = x80 ^ x80_d;
  assign #(T160 / 4.0)  x160_d  = x160;
  assign                x320    = x160 ^ x160_d;
  assign                x160_90 = x160_d;

  always_ff @(posedge clk_in_p) begin
    if (!lock_q) begin
      n_edges <= n_edges + 1'b1;
      if (n_edges == CW'(LOCK_CYCLES - 1)) lock_q <= 1'b1;
    end
  end

  assign #(T160 / 4.0)       lock_90  = lock_q;
  assign #(T160 / 2.0)       lock_180 = lock_q;
  assign #(3.0 * T160 / 4.0) lock_270 = lock_q;

  assign locked      = lock_q;
  assign clk_40      = lock_q   & clk_in_p;
  assign clk_80      = lock_q   & x80;
  assign clk_320     = lock_q   & x320;
  assign clk_160_0   = lock_q   & x160;
  assign clk_160_90  = lock_90  & x160_90;
  assign clk_160_180 = lock_180 & ~x160;
  assign clk_160_270 = lock_270 & ~x160_90;

endmodule
