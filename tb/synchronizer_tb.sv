// synchronizer: random 4-bit input changing between clock edges; the output
// must equal the input sampled two rising edges earlier.
module synchronizer_tb;
  localparam int W = 4;
  logic clk = 0;
  logic [W-1:0] a = '0, y;
  logic [W-1:0] hist [3] = '{default: '0};
  int checks = 0, failures = 0;

  synchronizer #(.WIDTH(W)) dut (.async_signal(a), .clk(clk), .sync_signal(y));

  always #5 clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = a;   // value sampled at this edge
      #1;
      if (n >= 2) begin
        checks++;
        if (y !== hist[1]) begin
          failures++;
          $display("cycle %0d: out %h expected %h", n, y, hist[1]);
        end
      end
      #2 a = W'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
