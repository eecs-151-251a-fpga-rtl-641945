// Gray code to binary converter (combinational).
//
// Binary bit i is the xor of all Gray bits from i up to the top bit, computed
// as a chain from the most significant bit down. Inverse of bin2gray. WIDTH
// defaults to 16, the largest pointer this design expects.
module gray2bin #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] gray,
  output logic [WIDTH-1:0] bin
);
  always_comb begin
    bin[WIDTH-1] = gray[WIDTH-1];
    for (int i = WIDTH - 2; i >= 0; i--)
      bin[i] = bin[i+1] ^ gray[i];
  end
endmodule
