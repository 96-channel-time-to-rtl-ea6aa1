// tb_oserdes_model -- random 8-bit words are offered on d; the tb keeps its own
// count of 320 MHz edges since reset, takes the word present on every 8th edge
// and expects its bits on oq, bit 0 first, one per following edge.
`timescale 1ps / 100fs
module tb_oserdes_model;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [7:0] d = '0;
  logic oq;
  logic expq[$];
  int cnt;

  oserdes_model #(.WIDTH(8)) dut (.clk, .rst, .d, .oq);

  always #1562.5 clk = ~clk;

  initial begin
    #(3125.0 * 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    cnt = 0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      if (cnt % 8 == 7) for (int b = 0; b < 8; b++) expq.push_back(d[b]);
      cnt++;
      #1;
      if (n % 8 == 3) d = 8'($urandom);
      if (expq.size() > 0) begin
        e = expq.pop_front();
        checks++;
        if (oq !== e) begin failures++; if (failures < 10) $display("n=%0d oq=%b expected %b", n, oq, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
