// tb_mlb_frame_merger -- random master and slave frames; every field of the
// 256-bit output is taken apart at fixed bit positions and compared with the
// inputs: header, zero FEC, right/master/left hit blocks, master BCN, and the
// right/left BX differences (signed 6 bits, saturated, 0 for a slave without
// hits). Saturation in both directions must occur.
`timescale 1ps / 100fs
module tb_mlb_frame_merger;
  import rpc_lb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  lb_frame_t m, r, l;
  logic [255:0] f;
  logic fv;
  int n_sat_hi = 0, n_sat_lo = 0;

  mlb_frame_merger dut (.clk, .rst, .mlb(m), .slbr(r), .slbl(l), .frame(f), .frame_valid(fv));

  always #12500 clk = ~clk;

  initial begin
    #(25000 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rb(input lb_frame_t s, input lb_frame_t mm);
    int d;
    if (!s.valid) return 0;
    d = int'(s.bx) - int'(mm.bx);
    if (d >= 2048) d -= 4096;
    if (d < -2048) d += 4096;
    if (d > 31) d = 31;
    if (d < -32) d = -32;
    return d;
  endfunction

  function automatic lb_frame_t rnd(input logic [11:0] base);
    lb_frame_t x;
    x = {$urandom, $urandom, $urandom};
    x.valid = $urandom % 4 != 0;
    case ($urandom % 4)
      0: x.bx = base + 12'($urandom % 64) - 12'd32;
      1: x.bx = 12'($urandom);
      default: x.bx = base + 12'($urandom % 8) - 12'd4;
    endcase
    return x;
  endfunction

  initial begin
    int er, el;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      m = {$urandom, $urandom, $urandom};
      m.valid = $urandom % 2;
      r = rnd(m.bx);
      l = rnd(m.bx);
      er = rb(r, m); el = rb(l, m);
      if (er == 31 || el == 31) n_sat_hi++;
      if (er == -32 || el == -32) n_sat_lo++;
      @(posedge clk); #1;
      checks++;
      if (f[255:254] !== 2'b01 || f[253:234] !== '0 || f[11:0] !== '0) begin failures++; $display("fixed fields"); end
      checks++;
      if (f[233:168] !== r.hits || f[167:102] !== m.hits || f[101:36] !== l.hits) begin failures++; $display("hit blocks"); end
      checks++;
      if (f[35:24] !== m.bx) begin failures++; $display("BCN"); end
      checks++;
      if ($signed(f[23:18]) != er || $signed(f[17:12]) != el) begin
        failures++;
        if (failures < 10) $display("RBCN got %0d/%0d expected %0d/%0d", $signed(f[23:18]), $signed(f[17:12]), er, el);
      end
      checks++;
      if (fv !== (m.valid | r.valid | l.valid)) begin failures++; $display("valid"); end
    end
    checks += 2;
    if (n_sat_hi == 0) failures++;
    if (n_sat_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
