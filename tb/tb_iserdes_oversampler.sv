// tb_iserdes_oversampler -- the input changes halfway between sampling
// instants (1.5625 ns apart) to a random level, or as a clean rising edge in a
// chosen quarter. After each phase-0 clock edge q must hold the four levels
// seen at the four preceding sampling instants, earliest in q[0]; a rising
// edge in quarters 1..4 must give 1110, 1100, 1000, 0000 then 1111.
`timescale 1ps / 100fs
module tb_iserdes_oversampler;
  int checks = 0, failures = 0;
  localparam realtime DT = 1562.5;
  logic c0 = 0, c90 = 0, c180 = 0, c270 = 0, rst = 1'b1, d = 1'b0;
  logic [3:0] q;
  logic v [0:4095];          // level seen at sampling instant j
  int j;
  int thermo_seen = 0;

  iserdes_oversampler dut (.d, .clk(c0), .oclk(c90), .clkb(c180), .oclkb(c270), .rst, .q);

  initial begin
    #(DT * 6000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sampling instant j is the rising edge of phase j mod 4.
  initial begin
    for (j = 0; j < 4000; j++) begin
      case (j % 4)
        0: c0 = 1; 1: c90 = 1; 2: c180 = 1; default: c270 = 1;
      endcase
      if (j >= 2) begin
        case ((j + 2) % 4)
          0: c0 = 0; 1: c90 = 0; 2: c180 = 0; default: c270 = 0;
        endcase
      end
      #(DT / 2);
      // the level for instant j+1 is applied between instants
      if (j < 400 || j >= 2000) v[j+1] = 1'($urandom);
      else begin
        // clean edges: 12 instants low, edge before instant j+1 in a chosen quarter
        int ph;
        ph = (j / 32) % 4;             // quarter of the edge
        v[j+1] = ((j % 32) >= 16 + ph);
      end
      d = v[j+1];
      #(DT / 2);
    end
  end

  int n;
  logic [3:0] expq;
  initial begin
    v[0] = 0;
    #(DT * 8 + DT / 4) rst = 1'b0;
    for (n = 3; n < 990; n++) begin
      @(posedge c0); #10;
      // edge at instant 4n: q holds instants 4n-4 .. 4n-1
      expq = {v[4*n-1], v[4*n-2], v[4*n-3], v[4*n-4]};
      checks++;
      if (q !== expq) begin
        failures++;
        if (failures < 10) $display("n=%0d q=%b expected %b", n, q, expq);
      end
      if (q inside {4'b1110, 4'b1100, 4'b1000} && 4*n-4 >= 400 && 4*n < 2000) thermo_seen++;
    end
    checks++;
    if (thermo_seen == 0) begin failures++; $display("no partial thermometer words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
