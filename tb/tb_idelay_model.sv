// tb_idelay_model -- measures the delay from each input edge to the matching
// output edge for several tap settings; it must be tap x 48 ps, for rising and
// falling edges alike.
`timescale 1ps / 100fs
module tb_idelay_model;
  int checks = 0, failures = 0;
  logic din = 0, dout;
  logic [4:0] tap = '0;
  realtime t_in, t_out;
  int taps [6] = '{0, 1, 7, 20, 30, 31};

  idelay_model dut (.idatain(din), .cntvaluein(tap), .dataout(dout));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    foreach (taps[i]) begin
      tap = 5'(taps[i]);
      #5000;
      for (int k = 0; k < 2; k++) begin
        t_in = $realtime;
        din = ~din;
        if (taps[i] == 0) #1; else @(dout);
        t_out = $realtime;
        checks++;
        if (dout !== din || (taps[i] != 0 && t_out - t_in != 48.0 * taps[i])) begin
          failures++;
          $display("tap %0d: delay %0t expected %0d", taps[i], t_out - t_in, 48 * taps[i]);
        end
        #5000;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
