// Exhaustive test of bin2gray at its default 16-bit width: every code must
// match the bitwise definition g[i] = b[i] ^ b[i+1] (top bit unchanged), and
// successive codes must differ in exactly one bit.
module bin2gray_tb;
  localparam int W = 16;
  logic [W-1:0] bin, gray, prev_gray;
  int checks = 0, failures = 0;

  bin2gray #(.WIDTH(W)) dut (.bin(bin), .gray(gray));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**W; v++) begin
      logic [W-1:0] expect_g;
      bin = W'(v);
      #1;
      for (int i = 0; i < W; i++)
        expect_g[i] = (i == W - 1) ? bin[i] : (bin[i] != bin[i+1]);
      checks++;
      if (gray !== expect_g) begin
        failures++;
        if (failures < 5) $display("bin2gray(%h) = %h, expected %h", bin, gray, expect_g);
      end
      if (v > 0) begin
        checks++;
        if ($countones(gray ^ prev_gray) != 1) failures++;
      end
      prev_gray = gray;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
