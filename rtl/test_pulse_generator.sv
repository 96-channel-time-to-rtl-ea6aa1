// test_pulse_generator -- produces test pulses with a known bunch crossing and
// a known edge position, for checking the TDC in a loop-back.
//
// A small state machine watches the BX counter. When it reads FIRST_BX it
// issues FIRST_WORD, when it reads SECOND_BX it issues SECOND_WORD; each word is
// one crossing of the pulse pattern, bit 0 first, and its first 1 bit sets
// where in the crossing the rising edge falls (3.125 ns per bit). The state
// machine then keeps the line high for PULSE_BX-1 further crossings, so the
// pulse has the 100 ns length of an RPC hit, and returns to idle (all zeros).
// The word is registered on clk_40 and serialised on clk_320 by the output
// serialiser model, so the pulse appears a fixed number of crossings after the
// trigger count. The two trigger counts, the 8-bit word bus and the serialiser
// follow the specification; the pulse length, the default words and the state
// encoding are this design's choices.
`timescale 1ps / 100fs
module test_pulse_generator
  import rpc_lb_pkg::*;
#(
  parameter int unsigned  WORD_W      = 8,
  parameter int unsigned  FIRST_BX    = 500,
  parameter int unsigned  SECOND_BX   = 1500,
  parameter logic [7:0]   FIRST_WORD  = 8'hFF,
  parameter logic [7:0]   SECOND_WORD = 8'hFE,
  parameter int unsigned  PULSE_BX    = 4
) (
  input  logic              clk_40,
  input  logic              clk_320,
  input  logic              rst,
  input  logic [BX_W-1:0]   bx_value,
  output logic [WORD_W-1:0] word,
  output logic              pulse_out
);
  typedef enum logic {S_IDLE, S_HIGH} state_t;

  localparam int unsigned CW = (PULSE_BX > 1) ? $clog2(PULSE_BX) : 1;

  state_t        state;
  logic [CW-1:0] remaining;

  always_ff @(posedge clk_40) begin
    if (rst) begin
      state     <= S_IDLE;
      remaining <= '0;
      word      <= '0;
    end else if (bx_value == BX_W'(FIRST_BX) || bx_value == BX_W'(SECOND_BX)) begin
      word      <= (bx_value == BX_W'(FIRST_BX)) ? WORD_W'(FIRST_WORD) : WORD_W'(SECOND_WORD);
      state     <= (PULSE_BX > 1) ? S_HIGH : S_IDLE;
      remaining <= CW'(PULSE_BX - 1);
    end else begin
      case (state)
        S_HIGH: begin
          word      <= '1;
          remaining <= remaining - 1'b1;
          if (remaining == CW'(1)) state <= S_IDLE;
        end
        default: word <= '0;
      endcase
    end
  end

  oserdes_model #(.WIDTH(WORD_W)) u_oserdes (
    .clk (clk_320),
    .rst (rst),
    .d   (word),
    .oq  (pulse_out)
  );

endmodule
