// Synchronous FIFO test (WIDTH 8, DEPTH 8 defaults).
//   1. after reset: empty and not full
//   2. fill with random data: not empty after each write, full after the last
//   3. write while full: refused, flags unchanged
//   4. drain: not full after each read, data in order, dout valid the cycle
//      after the edge with rd_en, empty after the last read
//   5. read while empty: flags unchanged, dout unchanged
//   6. write-then-read with no gap, several times
//   7. simultaneous read and write on the same edge, random traffic, compared
//      with a queue model; flags checked every cycle against the model count.
module fifo_tb;
  localparam int W = 8, D = 8;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] data [D];

  fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst(rst), .wr_en(wr_en), .din(din), .full(full),
    .rd_en(rd_en), .dout(dout), .empty(empty)
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
    logic [W-1:0] held;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(empty && !full, "reset state");

    // Fill.
    for (int i = 0; i < D; i++) begin
      data[i] = W'($urandom);
      wr_en = 1; din = data[i];
      @(posedge clk); #1;
      check(!empty, "not empty after write");
      check(full == (i == D - 1), $sformatf("full flag after write %0d", i));
    end
    // Overflow attempts.
    for (int i = 0; i < 4; i++) begin
      din = ~data[i];
      @(posedge clk); #1;
      check(full && !empty, "flags stable on overflow");
    end
    wr_en = 0;

    // Drain.
    for (int i = 0; i < D; i++) begin
      rd_en = 1;
      @(posedge clk); #1;
      check(dout == data[i], $sformatf("read %0d: %h expected %h", i, dout, data[i]));
      check(!full, "not full after read");
      check(empty == (i == D - 1), "empty flag after read");
    end
    held = dout;
    // Underflow attempts.
    for (int i = 0; i < 4; i++) begin
      @(posedge clk); #1;
      check(empty && !full && dout == held, "flags and data stable on underflow");
    end
    rd_en = 0;

    // Write then read immediately, several times.
    for (int i = 0; i < 6; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      wr_en = 1; din = v;
      @(posedge clk); #1;
      wr_en = 0; rd_en = 1;
      @(posedge clk); #1;
      rd_en = 0;
      check(dout == v && empty, "write then read");
    end

    // Random traffic with simultaneous reads and writes.
    for (int n = 0; n < 3000; n++) begin
      bit do_w, do_r;
      logic [W-1:0] v;
      v = W'($urandom);
      wr_en = ($urandom_range(0, 99) < (n < 1500 ? 60 : 40));
      rd_en = ($urandom_range(0, 99) < (n < 1500 ? 40 : 60));
      din = v;
      check(full == (model.size() == D), "full matches model");
      check(empty == (model.size() == 0), "empty matches model");
      do_w = wr_en && model.size() < D;
      do_r = rd_en && model.size() > 0;
      @(posedge clk); #1;
      if (do_r) begin
        logic [W-1:0] e;
        e = model.pop_front();
        check(dout == e, $sformatf("random read %h expected %h", dout, e));
      end
      if (do_w) model.push_back(v);
    end
    wr_en = 0; rd_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
