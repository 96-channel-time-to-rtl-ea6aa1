// tb_tdc_channel -- one TDC channel driven by the clock manager model.
// Pulses of 100 ns are placed at random times, always in the middle between
// two 1.5625 ns sampling instants. For each pulse the tb computes the ideal
// fine index r = floor((t - t0) / 1.5625 ns) from its own clock, and reads the
// channel's result as 16 x (clk_40 edges since t0) + tdc_out. The difference
// must be the same constant for every pulse (no gain error, one fixed offset,
// as the transfer function requires), every sub-BX value must occur, and a
// pulse placed 100 ps before a sampling instant must move by one step when the
// micro-step delay is set to 5 taps (240 ps).
`timescale 1ps / 100fs
module tb_tdc_channel;
  import rpc_lb_pkg::*;
  int checks = 0, failures = 0;
  localparam realtime DT = 1562.5;
  logic clk_p = 0, rst = 1, din = 0;
  logic c40, c80, c320, c0, c90, c180, c270, locked;
  logic [4:0] tap = '0;
  logic ev;
  logic [3:0] tdc;
  realtime t0;
  longint n40 = 0;
  longint result [$];
  int seen [16];
  int n_micro = 0;

  mmcm_model clkgen (.clk_in_p(clk_p), .clk_in_n(~clk_p), .clk_40(c40), .clk_80(c80), .clk_320(c320),
    .clk_160_0(c0), .clk_160_90(c90), .clk_160_180(c180), .clk_160_270(c270), .locked);

  tdc_channel dut (.clk_40(c40), .clk_160_0(c0), .clk_160_90(c90), .clk_160_180(c180), .clk_160_270(c270),
    .isds_rst(rst), .isds_in(din), .idelay_tap(tap), .new_event(ev), .tdc_out(tdc));

  always #12500 clk_p = ~clk_p;

  initial begin
    #(25000.0 * 3000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge c40) begin
    n40++;
    #1;
    if (ev) result.push_back(16 * (n40 - 1) + longint'(tdc));
  end

  // place a 100 ns pulse with its rising edge at t0 + x
  task automatic pulse(input realtime x);
    #(t0 + x - $realtime);
    din = 1;
    #100000;
    din = 0;
    #(25000.0 * (2 + $urandom % 3));
  endtask

  initial begin
    longint r, off, first_off;
    realtime x;
    @(posedge locked);
    t0 = $realtime;          // clk_40 edge number 1 is at t0
    repeat (4) @(posedge c40);
    #1 rst = 0;
    repeat (4) @(posedge c40);
    // linearity
    for (int p = 0; p < 120; p++) begin
      r = longint'(($realtime - t0) / DT) + 32 + $urandom % 16;
      x = r * DT + DT / 2;
      pulse(x);
      checks++;
      if (result.size() != 1) begin
        failures++; $display("pulse %0d: %0d results", p, result.size());
        result.delete();
        continue;
      end
      off = result.pop_front() - (r + 1);
      if (p == 0) first_off = off;
      seen[(r + 1) % 16]++;
      if (off != first_off) begin failures++; $display("pulse %0d: offset %0d, first %0d", p, off, first_off); end
    end
    $display("fixed offset %0d sub-BX steps", first_off);
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("index %0d never seen", k); end
    end
    // micro step: edge 100 ps before a sampling instant
    for (int p = 0; p < 8; p++) begin
      longint a, b;
      r = longint'(($realtime - t0) / DT) + 32 + p;
      tap = 0;
      pulse(r * DT - 100.0);
      a = result.size() ? result.pop_front() : -1;
      tap = 5;
      r = r + 16 * 12;
      pulse(r * DT - 100.0);
      b = result.size() ? result.pop_front() : -1;
      checks++;
      if (b - a != 16 * 12 + 1) begin failures++; $display("micro step: %0d then %0d", a, b); end
      else n_micro++;
    end
    checks++;
    if (n_micro == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
