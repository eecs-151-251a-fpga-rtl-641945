// Exhaustive test of gray2bin at its default 16-bit width. The Gray code of
// each binary value is formed here bit by bit and the converter must return
// the original value.
module gray2bin_tb;
  localparam int W = 16;
  logic [W-1:0] gray, bin;
  int checks = 0, failures = 0;

  gray2bin #(.WIDTH(W)) dut (.gray(gray), .bin(bin));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**W; v++) begin
      logic [W-1:0] b;
      b = W'(v);
      for (int i = 0; i < W; i++)
        gray[i] = (i == W - 1) ? b[i] : (b[i] != b[i+1]);
      #1;
      checks++;
      if (bin !== b) begin
        failures++;
        if (failures < 5) $display("gray2bin(%h) = %h, expected %h", gray, bin, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
