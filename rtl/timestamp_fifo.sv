// timestamp_fifo -- synchronous FIFO for compensated time stamps on their way
// to read-out.
//
// A write with wr_en stores din unless the FIFO is full (the word is then
// lost). A read with rd_en while not empty returns the oldest word on dout one
// cycle later, flagged by rd_valid. One clock for both sides. The 19-bit word
// follows the specification; the depth of 16 and the registered read are this
// design's choices.
`timescale 1ps / 100fs
module timestamp_fifo #(
  parameter int unsigned WIDTH = 19,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic             rd_valid,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      rd_valid <= 1'b0;
      dout     <= '0;
    end else begin
      rd_valid <= do_rd;
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) begin
        dout <= mem[rptr];
        rptr <= incr(rptr);
      end
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
