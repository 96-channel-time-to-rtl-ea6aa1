// tb_bx_counter -- checks the 15-bit bunch crossing counter against a
// reference count: reset to 0, +1 per clock, wrap after 32767, and a reset in
// the middle of counting.
`timescale 1ps / 100fs
module tb_bx_counter;
  import rpc_lb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic [BX_W-1:0] bc;
  int unsigned ref_cnt;

  bx_counter dut (.clk_40(clk), .bc_reset(rst), .bc_value(bc));

  always #12500 clk = ~clk;

  initial begin
    #(25000 * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1; checks++; if (bc !== '0) begin failures++; $display("not reset: %0d", bc); end
    rst = 1'b0;
    ref_cnt = 0;
    for (int n = 0; n < 32768 + 100; n++) begin
      @(posedge clk); #1;
      ref_cnt = (ref_cnt + 1) % 32768;
      checks++;
      if (bc !== BX_W'(ref_cnt)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: bc=%0d expected %0d", n, bc, ref_cnt);
      end
    end
    rst = 1'b1; @(posedge clk); #1; rst = 1'b0;
    checks++; if (bc !== '0) failures++;
    repeat (7) @(posedge clk); #1;
    checks++; if (bc !== 15'd7) begin failures++; $display("after reset %0d", bc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
