// uart_receiver at 40 clock cycles per bit. The test drives 8N1 frames of
// random bytes, some with the bit time off by one cycle (2.5% baud error),
// and a one-cycle glitch on the idle line. Each byte must appear on data_out
// with data_out_valid, which must stay up (data unchanged) until a cycle with
// data_out_ready, and then drop. The glitch must produce nothing.
module uart_receiver_tb;
  localparam int CPB = 40;
  logic clk = 0, rst = 1;
  logic line = 1, valid, ready = 0;
  logic [7:0] data;
  int checks = 0, failures = 0;
  logic [7:0] sent [$];

  uart_receiver #(.CLOCK_FREQ(4000), .BAUD_RATE(100)) dut (
    .clk(clk), .rst(rst), .serial_in(line),
    .data_out(data), .data_out_valid(valid), .data_out_ready(ready)
  );

  always #5 clk = ~clk;

  initial begin
    #20ms;
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

  task automatic send(input logic [7:0] b, input int cpb);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      line = f[k];
      repeat (cpb) @(negedge clk);
    end
  endtask

  // Consumer: take each byte after a random delay, checking it is held.
  initial begin
    forever begin
      @(posedge clk);
      if (valid && !ready) begin
        logic [7:0] d;
        logic [7:0] e;
        d = data;
        repeat ($urandom_range(0, 12)) begin
          @(posedge clk); #1;
          check(valid && data == d, "held until ready");
        end
        @(negedge clk) ready = 1;
        @(posedge clk); #1 ready = 0;
        e = (sent.size() > 0) ? sent.pop_front() : 8'h00;
        check(d == e, $sformatf("received %h expected %h", d, e));
        check(!valid, "valid drops after ready");
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    for (int n = 0; n < 25; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      sent.push_back(b);
      send(b, (n % 5 == 3) ? CPB + 1 : (n % 5 == 4) ? CPB - 1 : CPB);
      repeat (2 * CPB) @(negedge clk);   // leave time for the consumer
    end
    // Glitch on the idle line.
    line = 0;
    @(negedge clk) line = 1;
    repeat (20 * CPB) @(negedge clk);
    check(sent.size() == 0, "all bytes received");
    check(!valid, "no byte from a glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
