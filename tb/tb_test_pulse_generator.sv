// tb_test_pulse_generator -- with small trigger counts (BX 5 and 20) the
// parallel word must be FIRST_WORD, then all ones for PULSE_BX-1 crossings,
// then zero, and the same with SECOND_WORD; on the serial line the two pulses
// must be 32 and 31 bits of 3.125 ns long and their rising edges
// 15 crossings + 1 bit apart.
`timescale 1ps / 100fs
module tb_test_pulse_generator;
  import rpc_lb_pkg::*;
  int checks = 0, failures = 0;
  logic c40 = 0, c320 = 0, rst = 1;
  logic [BX_W-1:0] bx = '0;
  logic [7:0] word;
  logic pulse;
  realtime rise [$];
  realtime fall [$];
  realtime tr;

  test_pulse_generator #(.FIRST_BX(5), .SECOND_BX(20), .FIRST_WORD(8'hFF), .SECOND_WORD(8'hFE), .PULSE_BX(4))
    dut (.clk_40(c40), .clk_320(c320), .rst, .bx_value(bx), .word, .pulse_out(pulse));

  initial begin
    for (int i = 0; i < 8 * 60; i++) begin
      c320 = 1; if (i % 8 == 0) c40 = 1; if (i % 8 == 4) c40 = 0;
      #1562.5; c320 = 0; #1562.5;
    end
  end

  initial begin
    #(25000.0 * 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge pulse) rise.push_back($realtime);
  always @(negedge pulse) if (!rst) fall.push_back($realtime);

  function automatic logic [7:0] expected_word(input int b);
    // word registered at the clk_40 edge where bx == b - 1 has been seen
    if (b - 1 == 5)  return 8'hFF;
    if (b - 1 == 20) return 8'hFE;
    if (b - 1 > 5  && b - 1 <= 8)  return 8'hFF;
    if (b - 1 > 20 && b - 1 <= 23) return 8'hFF;
    return 8'h00;
  endfunction

  initial begin
    repeat (2) @(posedge c40);
    #1 rst = 0;
    for (int b = 0; b < 40; b++) begin
      bx = BX_W'(b);
      @(posedge c40); #1;
      checks++;
      if (word !== expected_word(b + 1)) begin
        failures++; $display("bx=%0d word=%h expected %h", b, word, expected_word(b + 1));
      end
    end
    repeat (5) @(posedge c40);
    checks++;
    if (rise.size() != 2 || fall.size() != 2) begin
      failures++; $display("pulses: %0d rises %0d falls", rise.size(), fall.size());
    end else begin
      checks += 3;
      if (fall[0] - rise[0] != 32 * 3125.0) begin failures++; $display("pulse 1 length %0t", fall[0] - rise[0]); end
      if (fall[1] - rise[1] != 31 * 3125.0) begin failures++; $display("pulse 2 length %0t", fall[1] - rise[1]); end
      if (rise[1] - rise[0] != 15 * 25000.0 + 3125.0) begin failures++; $display("edge spacing %0t", rise[1] - rise[0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
