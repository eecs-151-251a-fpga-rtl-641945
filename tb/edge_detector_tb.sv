// edge_detector: random 3-bit input; after every edge the output must be the
// rising-edge pattern of the two previously sampled input values, i.e. one
// pulse per 0->1 transition, lasting one cycle, and nothing on 1->0.
module edge_detector_tb;
  localparam int W = 3;
  logic clk = 0;
  logic [W-1:0] a = '0, y;
  logic [W-1:0] s0 = '0, s1 = '0;
  int checks = 0, failures = 0, rises = 0;

  edge_detector #(.WIDTH(W)) dut (.clk(clk), .signal_in(a), .edge_detect_pulse(y));

  always #5 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      @(posedge clk);
      s1 = s0; s0 = a;
      #1;
      if (n >= 1) begin
        checks++;
        if (y !== (s0 & ~s1)) begin
          failures++;
          $display("cycle %0d: pulse %b expected %b", n, y, s0 & ~s1);
        end
        rises += $countones(s0 & ~s1);
      end
      #2 if ($urandom_range(0, 2) == 0) a = W'($urandom);
    end
    checks++;
    if (rises < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
