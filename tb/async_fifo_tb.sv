// Asynchronous FIFO test with unrelated clocks (write 8 ns, read 41 ns, then
// the read clock sped up to 5.3 ns). There is no reset: the test first checks
// that the FIFO comes up empty and not full from its initial values. Random
// writes and reads are compared with a queue model:
//   - every word comes out once, in order, the read clock after rd_en;
//   - a write is never taken when the model holds DEPTH words and a read is
//     never taken when it holds none (flags may be late, never early);
//   - after each side goes quiet, full and empty settle to the exact state
//     within a few cycles of the other clock.
// It starts with the directed sequence also used for the synchronous FIFO
// (fill, overflow attempts, drain, underflow attempts, then single
// write-then-read transfers). Both full and empty are required to occur.
module async_fifo_tb;
  localparam int W = 20, D = 8;
  logic wr_clk = 0, rd_clk = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_written = 0, n_read = 0;
  realtime rd_half = 20.5ns;
  logic [W-1:0] model [$];

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .wr_clk(wr_clk), .wr_en(wr_en), .din(din), .full(full),
    .rd_clk(rd_clk), .rd_en(rd_en), .dout(dout), .empty(empty)
  );

  always #4 wr_clk = ~wr_clk;
  always #(rd_half) rd_clk = ~rd_clk;

  initial begin
    #2ms;
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

  // Write side bookkeeping.
  always @(posedge wr_clk) begin
    if (full) n_full++;
    if (wr_en && !full) begin
      check(model.size() < D, "write accepted only with room");
      model.push_back(din);
      n_written++;
    end
  end

  // Read side bookkeeping.
  always @(posedge rd_clk) begin
    if (empty) n_empty++;
    if (rd_en && !empty) begin
      logic [W-1:0] e;
      check(model.size() > 0, "read accepted only with data");
      e = model.pop_front();
      n_read++;
      #1 check(dout == e, $sformatf("read %h expected %h", dout, e));
    end
  end

  task automatic traffic(input int cycles, input int wr_pct, input int rd_pct);
    fork
      repeat (cycles) begin
        @(negedge wr_clk);
        wr_en = ($urandom_range(0, 99) < wr_pct);
        din = W'($urandom);
      end
      repeat (cycles / 4) begin
        @(negedge rd_clk);
        rd_en = ($urandom_range(0, 99) < rd_pct);
      end
    join
    @(negedge wr_clk) wr_en = 0;
    @(negedge rd_clk) rd_en = 0;
  endtask

  initial begin
    logic [W-1:0] held;
    #1;
    check(empty && !full, "initial state without reset");

    // Directed sequence: fill, try to overflow, drain, try to underflow.
    for (int i = 0; i < D; i++) begin
      @(negedge wr_clk) wr_en = 1; din = W'($urandom);
      @(posedge wr_clk);
    end
    @(negedge wr_clk) wr_en = 1; din = '1;     // overflow attempts
    repeat (6) begin
      @(posedge wr_clk); #1 check(full, "full after DEPTH writes, stays full");
    end
    @(negedge wr_clk) wr_en = 0;
    repeat (4) @(posedge rd_clk);
    #1 check(!empty, "read side sees data");
    @(negedge rd_clk) rd_en = 1;
    repeat (D + 4) @(posedge rd_clk);          // D reads, then underflow attempts
    #1 check(empty, "empty after DEPTH reads");
    held = dout;
    repeat (4) begin
      @(posedge rd_clk); #1 check(empty && dout == held, "underflow leaves data and flag alone");
    end
    @(negedge rd_clk) rd_en = 0;
    repeat (6) @(posedge wr_clk);
    #1 check(!full, "write side sees the room");
    check(model.size() == 0, "directed sequence complete");

    // Write then read, several times in a row.
    repeat (5) begin
      @(negedge wr_clk) wr_en = 1; din = W'($urandom);
      @(negedge wr_clk) wr_en = 0;
      wait (!empty);
      @(negedge rd_clk) rd_en = 1;
      @(negedge rd_clk) rd_en = 0;
    end
    repeat (4) @(posedge rd_clk);
    #1 check(model.size() == 0 && empty, "write-then-read sequence complete");
    traffic(2000, 50, 90);       // writer faster than reader: fills
    repeat (6) @(posedge wr_clk);
    repeat (6) @(posedge rd_clk);
    #1 check(full == (model.size() == D), "full settles");
    check(empty == (model.size() == 0), "empty settles");
    rd_half = 2.65ns;            // reader now faster than writer
    traffic(2000, 30, 70);
    repeat (6) @(posedge wr_clk);
    repeat (6) @(posedge rd_clk);
    #1 check(full == (model.size() == D), "full settles 2");
    check(empty == (model.size() == 0), "empty settles 2");
    // Drain what is left.
    @(negedge rd_clk) rd_en = 1;
    repeat (3 * D) @(posedge rd_clk);
    @(negedge rd_clk) rd_en = 0;
    repeat (6) @(posedge rd_clk);
    #1 check(model.size() == 0 && empty, "drained");
    check(n_full > 0, "full reached");
    check(n_empty > 0, "empty reached");
    check(n_written == n_read && n_read > 100, $sformatf("words %0d in, %0d out", n_written, n_read));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
