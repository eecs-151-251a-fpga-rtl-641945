// Binary to Gray code converter (combinational).
//
// gray = bin ^ (bin >> 1): consecutive binary values differ in exactly one
// Gray bit, which is what lets a counter cross clock domains through plain
// flip-flops. WIDTH defaults to 16, the largest pointer this design expects;
// the asynchronous FIFO instantiates it at its pointer width.
module bin2gray #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] bin,
  output logic [WIDTH-1:0] gray
);
  assign gray = bin ^ (bin >> 1);
endmodule
