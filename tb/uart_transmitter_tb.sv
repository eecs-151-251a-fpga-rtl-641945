// uart_transmitter at 10 clock cycles per bit (CLOCK_FREQ 1000, BAUD 100).
// Random bytes are offered back to back; the line is sampled in the middle of
// each bit to rebuild start bit, 8 data bits LSB first and stop bit, and
// compared with the byte sent. Ready must drop on acceptance and come back
// exactly 10 bit times (100 cycles) later; the line idles high.
module uart_transmitter_tb;
  localparam int CPB = 10;
  logic clk = 0, rst = 1;
  logic [7:0] data = '0;
  logic valid = 0, ready, line;
  int checks = 0, failures = 0;

  uart_transmitter #(.CLOCK_FREQ(1000), .BAUD_RATE(100)) dut (
    .clk(clk), .rst(rst), .data_in(data), .data_in_valid(valid),
    .data_in_ready(ready), .serial_out(line)
  );

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: FAIL %s", $time, what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(line == 1 && ready == 1, "idle");
    for (int n = 0; n < 30; n++) begin
      logic [7:0] b, got;
      int busy;
      b = 8'($urandom);
      if (n % 3 == 2) repeat ($urandom_range(1, 30)) begin @(posedge clk); #1 check(line == 1, "idle high"); end
      data = b; valid = 1;
      @(posedge clk); #1;     // accepted here
      valid = 0; data = 8'hxx;
      check(!ready, "busy after accept");
      // Bit k occupies cycles [k*CPB, (k+1)*CPB) after the accept edge.
      repeat (CPB / 2 - 1) @(posedge clk);
      #1 check(line == 0, "start bit");
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(posedge clk);
        #1 got[k] = line;
      end
      repeat (CPB) @(posedge clk);
      #1 check(line == 1, "stop bit");
      check(got == b, $sformatf("byte %h sent as %h", b, got));
      busy = 9 * CPB + CPB / 2 - 1;   // cycles since the accepting edge
      while (!ready && busy < 20 * CPB) begin @(posedge clk); #1 busy++; end
      check(busy == 10 * CPB, $sformatf("frame took %0d cycles", busy));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
