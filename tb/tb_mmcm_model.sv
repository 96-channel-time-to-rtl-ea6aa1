// tb_mmcm_model -- drives a 40 MHz differential reference and checks that
// locked rises after the lock count, that clk_40/clk_80/clk_320/clk_160_x have
// periods 25/12.5/3.125/6.25 ns, and that the four 160 MHz clocks rise
// 1.5625 ns apart in the order 0, 90, 180, 270 degrees.
`timescale 1ps / 100fs
module tb_mmcm_model;
  int checks = 0, failures = 0;
  logic clk_p = 0;
  logic c40, c80, c320, c0, c90, c180, c270, locked;
  realtime t40, t80, t320, t0, t90, t180, t270, p;
  int nref = 0;

  mmcm_model #(.LOCK_CYCLES(8)) dut (.clk_in_p(clk_p), .clk_in_n(~clk_p), .clk_40(c40), .clk_80(c80), .clk_320(c320),
    .clk_160_0(c0), .clk_160_90(c90), .clk_160_180(c180), .clk_160_270(c270), .locked);

  always #12500 clk_p = ~clk_p;
  always @(posedge clk_p) nref++;

  task automatic check(input string what, input realtime got, input realtime want);
    checks++;
    if (got != want) begin failures++; $display("%s: %0t expected %0t", what, got, want); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++; if (locked !== 1'b0) failures++;
    @(posedge locked);
    check("lock time (8th reference edge)", $realtime, 12500.0 + 7 * 25000.0);
    repeat (3) @(posedge c40);
    t40 = $realtime; @(posedge c40); check("clk_40 period", $realtime - t40, 25000.0);
    @(posedge c80); t80 = $realtime; @(posedge c80); check("clk_80 period", $realtime - t80, 12500.0);
    check("clk_80 on clk_40 grid", realtime'(int'(t80) % 12500), 0.0);
    @(posedge c320); t320 = $realtime; @(posedge c320); p = $realtime; check("clk_320 period", p - t320, 3125.0);
    @(posedge c0); t0 = $realtime;
    check("clk_160_0 on clk_40 grid", realtime'(int'(t0 - t40) % 6250), 0.0);
    @(posedge c90);  check("90 deg", $realtime - t0, 1562.5);
    @(posedge c180); check("180 deg", $realtime - t0, 3125.0);
    @(posedge c270); check("270 deg", $realtime - t0, 4687.5);
    @(posedge c0);   check("clk_160 period", $realtime - t0, 6250.0);
    checks++; if (!locked) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
