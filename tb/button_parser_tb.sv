// button_parser at small debounce counts (tick every 4 cycles, 3 samples).
// Each of the four buttons is pressed with contact bounce on press and
// release, held, and released; the test counts the output pulses: exactly one
// per press, one cycle long, on the pressed button only, and none during
// short glitches.
module button_parser_tb;
  localparam int S = 4, P = 3;
  logic clk = 0;
  logic [3:0] in = '0, out;
  int checks = 0, failures = 0;
  int pulses [4] = '{default: 0};
  int wide = 0;
  logic [3:0] out_d = '0;

  button_parser #(.WIDTH(4), .SAMPLE_CNT_MAX(S), .PULSE_CNT_MAX(P)) dut (
    .clk(clk), .in(in), .out(out)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    for (int i = 0; i < 4; i++) if (out[i]) pulses[i]++;
    if ((out & out_d) != 0) wide++;
    out_d <= out;
  end

  initial begin
    #500us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Contact bounce: short high spikes (1-2 cycles) separated by lows long
  // enough for the debouncer to sample them, then the final level.
  task automatic bounce(input int b, input bit level);
    repeat (4) begin
      @(negedge clk) in[b] = 1'b1;
      repeat ($urandom_range(1, 2)) @(posedge clk);
      @(negedge clk) in[b] = 1'b0;
      repeat ($urandom_range(S, S + 2)) @(posedge clk);
    end
    @(negedge clk) in[b] = level;
  endtask

  initial begin
    int prev_cnt [4];
    repeat (20) @(posedge clk);
    for (int b = 0; b < 4; b++) begin
      prev_cnt = pulses;
      bounce(b, 1'b1);
      repeat (4 * S * P) @(posedge clk);
      bounce(b, 1'b0);
      repeat (4 * S * P) @(posedge clk);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (pulses[i] - prev_cnt[i] != ((i == b) ? 1 : 0)) begin
          failures++;
          $display("button %0d press: %0d pulses on output %0d", b, pulses[i] - prev_cnt[i], i);
        end
      end
    end
    // A glitch of one cycle gives nothing.
    prev_cnt = pulses;
    @(negedge clk) in[2] = 1'b1;
    @(negedge clk) in[2] = 1'b0;
    repeat (4 * S * P) @(posedge clk);
    checks++;
    if (pulses[2] != prev_cnt[2]) failures++;
    checks++;
    if (wide != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
