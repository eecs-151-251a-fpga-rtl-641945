// uart: transmitter looped back into the receiver at 8 cycles per bit.
// Random bytes go in through data_in/valid/ready and must come out of
// data_out in order; the time from acceptance to data_out_valid must be
// about 9.5 bit times (the receiver reports in the middle of the stop bit).
module uart_tb;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, loop;
  logic [7:0] din = '0, dout;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  int checks = 0, failures = 0;

  uart #(.CLOCK_FREQ(800), .BAUD_RATE(100)) dut (
    .clk(clk), .reset(rst),
    .data_in(din), .data_in_valid(in_valid), .data_in_ready(in_ready),
    .data_out(dout), .data_out_valid(out_valid), .data_out_ready(out_ready),
    .serial_in(loop), .serial_out(loop)
  );

  always #5 clk = ~clk;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 20; n++) begin
      logic [7:0] b;
      int t;
      b = 8'($urandom);
      #1 din = b; in_valid = 1;
      while (!in_ready) @(posedge clk);
      @(posedge clk); #1 in_valid = 0;
      t = 0;
      while (!out_valid && t < 20 * CPB) begin @(posedge clk); #1 t++; end
      checks++;
      if (dout != b) begin
        failures++;
        $display("loopback %h -> %h", b, dout);
      end
      checks++;
      if (t < 9 * CPB || t > 10 * CPB) begin
        failures++;
        $display("latency %0d cycles", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
