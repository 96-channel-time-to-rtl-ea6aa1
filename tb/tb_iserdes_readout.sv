// tb_iserdes_readout -- feeds a known sample stream (four samples per 160 MHz
// word, earliest in bit 0) made of pulses of random length and spacing, and
// checks every clk_40 output against the first 0->1 transition of the
// 16-sample window the readout is specified to see. The window of the
// crossing that ends at the clk_40 edge on 160 MHz edge E consists of the words
// applied after edges E-5 .. E-2 (one cycle in the sampler register, one in
// the shift register); the result appears after the next clk_40 edge. Also
// checks one event per crossing holding an edge, the first edge winning when
// a crossing holds several, and every sub-BX position occurring.
`timescale 1ps / 100fs
module tb_iserdes_readout;
  import rpc_lb_pkg::*;
  int checks = 0, failures = 0;
  localparam int NW = 3000;            // 160 MHz words
  logic clk160 = 0, clk40 = 0, rst = 1'b1;
  logic [3:0] word = '0;
  logic new_event;
  logic [3:0] tdc_out;
  logic s [0:4*NW+64];                 // sample stream
  int   e;                             // 160 MHz edge counter
  int   edges_in = 0, events_out = 0;
  int   pos_seen [16];
  int   boundary_edges = 0;

  iserdes_readout dut (.clk_160_0(clk160), .clk_40(clk40), .rst, .isds_data(word), .new_event, .tdc_out);

  initial begin
    #(6250.0 * (NW + 200));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream: pulses of 1..60 samples, gaps 1..70 samples
  initial begin
    int i, len;
    logic lvl;
    i = 0; lvl = 0;
    while (i < 4*NW + 64) begin
      // the middle third has short pulses: several edges per window
      if (i > 4*NW/3 && i < 8*NW/3) len = 1 + $urandom % 6;
      else len = lvl ? 1 + $urandom % 60 : 1 + $urandom % 70;
      for (int k = 0; k < len && i < 4*NW + 64; k++) s[i++] = lvl;
      lvl = !lvl;
    end
    for (int k = 0; k < 8; k++) s[k] = 0;
  end

  // clocks: clk40 rises on every 4th clk160 rising edge
  initial begin
    for (e = 0; e < NW + 100; e++) begin
      clk160 = 1;
      if (e % 4 == 0) clk40 = 1;
      if (e % 4 == 2) clk40 = 0;
      #3125;
      clk160 = 0;
      #3125;
    end
  end

  // word e is applied right after edge e
  always @(posedge clk160) word <= (e < NW) ? {s[4*e+3], s[4*e+2], s[4*e+1], s[4*e]} : 4'b0;

  int multi_edge_windows = 0;
  int exp_events = 0;
  function automatic void expect_window(input int first_word, output logic ev, output int pos);
    int base, n;
    base = 4 * first_word;
    ev = 0; pos = 0; n = 0;
    for (int k = 15; k >= 0; k--) begin
      logic prev;
      prev = (base + k - 1 >= 0) ? s[base + k - 1] : 1'b0;
      if (s[base + k] && !prev && base + k >= 0) begin ev = 1; pos = k; n++; end
    end
    if (n > 1) multi_edge_windows++;
  endfunction

  initial begin
    logic ev; int pos; int ecap;
    repeat (3) @(posedge clk40);
    #1 rst = 1'b0;
    @(posedge clk40);
    ecap = e;
    forever begin
      @(posedge clk40); #1;          // result of the window captured at ecap
      if (ecap - 5 >= 2 && ecap < NW) begin
        expect_window(ecap - 5, ev, pos);
        if (ev) exp_events++;
        checks++;
        if (new_event !== ev || (ev && tdc_out !== 4'(pos))) begin
          failures++;
          if (failures < 10) $display("E=%0d: got ev=%b tdc=%0d expected ev=%b pos=%0d", ecap, new_event, tdc_out, ev, pos);
        end
        if (new_event) begin
          events_out++;
          pos_seen[tdc_out]++;
          if (tdc_out == 0) boundary_edges++;
        end
      end
      if (ecap >= NW) break;
      ecap = e;                      // window captured at the edge just passed
    end
    // one event per crossing that holds at least one rising edge
    for (int i = 4*(8-5); i < 4*(NW - 9); i++) if (s[i] && !s[i-1]) edges_in++;
    $display("edges in span %0d, events %0d (expected %0d), boundary %0d, multi-edge windows %0d",
             edges_in, events_out, exp_events, boundary_edges, multi_edge_windows);
    checks++;
    if (events_out != exp_events || exp_events == 0) begin failures++; $display("event count mismatch"); end
    checks++;
    if (multi_edge_windows == 0) begin failures++; $display("no window with several edges"); end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (pos_seen[k] == 0) begin failures++; $display("sub-BX %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
