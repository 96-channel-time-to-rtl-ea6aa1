// tb_latency_compensator -- random stamps and offsets; the output must be
// ({bx, sub} - offset) mod 2^19 exactly one clock after the input valid, and
// the valid must follow the input valid with the same one-clock delay.
`timescale 1ps / 100fs
module tb_latency_compensator;
  import rpc_lb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  logic tdc_valid = 1'b0;
  logic [SUBBX_W-1:0] tdc_value = '0;
  logic [BX_W-1:0] bx_value = '0;
  stamp_t offset = '0;
  logic   cv;
  stamp_t cval;
  int     exp_val;
  logic   exp_v;

  latency_compensator dut (.clk_40(clk), .rst, .tdc_valid, .tdc_value, .bx_value,
                           .macro_offset(offset), .comp_tdc_valid(cv), .comp_tdc_value(cval));

  always #12500 clk = ~clk;

  initial begin
    #(25000 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      tdc_valid = ($urandom % 3) == 0;
      tdc_value = SUBBX_W'($urandom);
      bx_value  = BX_W'($urandom);
      offset    = (n % 4 == 0) ? stamp_t'($urandom) : stamp_t'($urandom % 200);
      exp_v     = tdc_valid;
      exp_val   = (int'(bx_value) * 16 + int'(tdc_value) - int'(offset)) & ((1 << 19) - 1);
      @(posedge clk); #1;
      checks++;
      if (cv !== exp_v) begin failures++; $display("valid mismatch at %0d", n); end
      if (exp_v) begin
        checks++;
        if (int'(cval) != exp_val) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d expected %0d", n, cval, exp_val);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
