// Bridge from a FIFO read port to a ready/valid source.
//
// The FIFO delivers a word on dout one cycle after the edge on which rd_en
// was high and then holds it, so valid is a register that rises the cycle
// after a read and the word itself is passed straight through from fifo_dout.
// A new read is issued whenever the FIFO is not empty and the output slot is
// free or is being emptied by the consumer (valid && ready) in this cycle, so
// back-to-back transfers run at one word per cycle. rst is synchronous. This
// is the small piece of glue the lab asks for between the UART transmit FIFO
// and the transmitter; its structure is this design's.
module fifo_rv_source #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,

  input  logic [WIDTH-1:0] fifo_dout,
  input  logic             fifo_empty,
  output logic             fifo_rd_en,

  output logic [WIDTH-1:0] data,
  output logic             valid,
  input  logic             ready
);
  assign fifo_rd_en = !fifo_empty && (!valid || ready);
  assign data       = fifo_dout;

  always_ff @(posedge clk) begin
    if (rst)             valid <= 1'b0;
    else if (fifo_rd_en) valid <= 1'b1;
    else if (ready)      valid <= 1'b0;
  end
endmodule
