// oserdes_model -- behavioural model of the FPGA output serialiser that sends
// the test pulse pattern.
//
// An 8-bit word d, produced in the 40 MHz domain, is shifted out on oq one bit
// per rising edge of the 320 MHz clock, bit 0 first, so one word fills exactly
// one 25 ns bunch crossing (3.125 ns per bit). A 3-bit counter started by rst
// decides when the next word is loaded; the word is sampled on the 320 MHz edge
// that the counter marks, so the phase of a word relative to the 40 MHz clock
// is fixed after reset but not otherwise defined. Pin names and the bit order
// are this model's choices; the 8:1 ratio follows the 8-bit pattern bus.
`timescale 1ps / 100fs
module oserdes_model #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic             oq
);
  localparam int unsigned CW = $clog2(WIDTH);

  logic [CW-1:0]    cnt;
  logic [WIDTH-1:0] shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      shreg <= '0;
      oq    <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(WIDTH-1)) begin
        oq    <= d[0];
        shreg <= d >> 1;
      end else begin
        oq    <= shreg[0];
        shreg <= shreg >> 1;
      end
    end
  end

endmodule
