// tb_timestamp_fifo -- random writes and reads against a queue reference:
// data order, read latency of one clock, empty/full flags, and writes lost
// when full.
`timescale 1ps / 100fs
module tb_timestamp_fifo;
  int checks = 0, failures = 0;
  localparam int W = 19, D = 16;
  logic clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic rd_valid, empty, full;
  logic [W-1:0] q[$];
  logic [W-1:0] expd;
  logic exp_rv, exp_wr;
  int n_full = 0;

  timestamp_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .wr_en, .din, .rd_en, .rd_valid, .dout, .empty, .full);

  always #12500 clk = ~clk;

  initial begin
    #(25000 * 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      // phases: fill-biased, drain-biased, balanced
      case ((n / 300) % 3)
        0: begin wr_en = ($urandom % 4) != 0; rd_en = ($urandom % 4) == 0; end
        1: begin wr_en = ($urandom % 4) == 0; rd_en = ($urandom % 4) != 0; end
        default: begin wr_en = $urandom % 2; rd_en = $urandom % 2; end
      endcase
      din = W'($urandom);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D)) begin
        failures++; $display("flags wrong at %0d: size %0d empty %b full %b", n, q.size(), empty, full);
      end
      if (full) n_full++;
      // a write is accepted only if the FIFO was not full before this clock
      exp_wr = wr_en && q.size() < D;
      exp_rv = rd_en && q.size() > 0;
      if (exp_rv) expd = q.pop_front();
      if (exp_wr) q.push_back(din);
      @(posedge clk); #1;
      checks++;
      if (rd_valid !== exp_rv) begin failures++; $display("rd_valid wrong at %0d", n); end
      if (exp_rv) begin
        checks++;
        if (dout !== expd) begin failures++; if (failures < 10) $display("data %h expected %h", dout, expd); end
      end
    end
    checks++; if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
