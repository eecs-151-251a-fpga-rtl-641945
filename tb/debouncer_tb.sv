// debouncer at small counts (sample tick every 5 cycles, 4 high samples).
// Checks, per bit of a 2-bit instance:
//   - bursts of bouncing shorter than the debounce time never raise the output;
//   - a steady high input raises it between (4-1)*5+1 and 4*5+5 cycles later
//     and keeps it high while the input stays high;
//   - a low input drops it within one sample period (5 cycles + 1);
//   - the other bit is not disturbed.
module debouncer_tb;
  localparam int S = 5, P = 4;
  logic clk = 0;
  logic [1:0] in = '0, out;
  int checks = 0, failures = 0;

  debouncer #(.WIDTH(2), .SAMPLE_CNT_MAX(S), .PULSE_CNT_MAX(P)) dut (
    .clk(clk), .glitchy_signal(in), .debounced_signal(out)
  );

  always #5 clk = ~clk;

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: FAIL %s (in=%b out=%b)", $time, what, in, out);
    end
  endtask

  initial begin
    int t;
    repeat (3 * S) @(posedge clk);
    check(out == 2'b00, "idle low");
    for (int b = 0; b < 2; b++) begin
      // Bouncing: high for at most 2 ticks at a time, then low.
      for (int k = 0; k < 20; k++) begin
        @(negedge clk) in[b] = 1'b1;
        repeat ($urandom_range(1, 2 * S - 1)) begin
          @(posedge clk); #1 check(out[b] == 1'b0, "no output while bouncing");
        end
        @(negedge clk) in[b] = 1'b0;
        repeat ($urandom_range(S, 2 * S)) @(posedge clk);   // long enough for a tick to see it low
      end
      repeat (2 * S) @(posedge clk);
      // Steady press.
      @(negedge clk) in[b] = 1'b1;
      t = 0;
      while (!out[b] && t < 10 * S * P) begin
        @(posedge clk); #1 t++;
      end
      check(t >= (P - 1) * S + 1 && t <= P * S + S, $sformatf("rise after %0d cycles", t));
      check(out[1-b] == 1'b0, "other bit undisturbed");
      repeat (5 * S) begin
        @(posedge clk); #1 check(out[b] == 1'b1, "held high");
      end
      // Release.
      @(negedge clk) in[b] = 1'b0;
      t = 0;
      while (out[b] && t < 10 * S) begin
        @(posedge clk); #1 t++;
      end
      check(t <= S + 1, $sformatf("fall after %0d cycles", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
