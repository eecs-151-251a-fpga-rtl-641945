// fifo_rv_source between a fifo (depth 8) and a consumer with random ready.
// A producer writes a numbered sequence into the FIFO at random times; every
// transfer on the ready/valid side (valid && ready) must deliver the next
// number, with no loss and no repeat, and data must hold while valid waits
// for ready. With ready held high and the FIFO full the bridge must deliver
// one word per cycle.
module fifo_rv_source_tb;
  logic clk = 0, rst = 1;
  logic wr_en = 0, full, empty, rd_en;
  logic [7:0] din = '0, fdout, data;
  logic valid, ready = 0;
  int checks = 0, failures = 0;
  int next_in = 0, next_out = 0;

  fifo #(.WIDTH(8), .DEPTH(8)) u_fifo (
    .clk(clk), .rst(rst), .wr_en(wr_en), .din(din), .full(full),
    .rd_en(rd_en), .dout(fdout), .empty(empty)
  );

  fifo_rv_source #(.WIDTH(8)) dut (
    .clk(clk), .rst(rst), .fifo_dout(fdout), .fifo_empty(empty), .fifo_rd_en(rd_en),
    .data(data), .valid(valid), .ready(ready)
  );

  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       was_stalled = 0;
  logic [7:0] stalled_data;
  always @(posedge clk) if (!rst) begin
    if (was_stalled) begin
      checks++;
      if (!valid || data != stalled_data) begin
        failures++;
        $display("%t: data not held while stalled", $time);
      end
    end
    if (valid && ready) begin
      checks++;
      if (data != 8'(next_out)) begin
        failures++;
        $display("%t: got %0d expected %0d", $time, data, 8'(next_out));
      end
      next_out++;
    end
    if (wr_en && !full) next_in++;
    was_stalled  <= valid && !ready;
    stalled_data <= data;
  end

  initial begin
    int t;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 99) < 50);
      din   = 8'(next_in);
      ready = ($urandom_range(0, 99) < 50);
    end
    // Fill, then drain at full rate.
    @(negedge clk) ready = 0; wr_en = 1;
    while (!full) @(negedge clk) din = 8'(next_in);
    wr_en = 0;
    repeat (3) @(negedge clk);
    t = next_out;
    ready = 1;
    repeat (8) @(negedge clk);
    checks++;
    if (next_out - t != 8) begin
      failures++;
      $display("burst delivered %0d in 8 cycles", next_out - t);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (next_out != next_in || next_out < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
