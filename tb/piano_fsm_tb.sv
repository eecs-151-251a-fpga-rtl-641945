// piano_fsm with real FIFOs around it, at reduced rates: 1 MHz clock, 50 kHz
// samples (one every 20 cycles), note_length 12000 cycles, step 500. The
// testbench writes characters into the UART receive FIFO, reads the transmit
// FIFO and drains the I2S sample FIFO. It checks:
//   - every character is echoed unchanged, in order;
//   - the time between the echoes of two queued characters is note_length
//     plus a few cycles, before and after note_length changes (up twice,
//     down three times, and down at the minimum);
//   - samples are written every 20 cycles while the FIFO has room;
//   - a note ('n', A4: 1136-cycle half period at 1 MHz) gives only 0x7FFFF
//     and 0x80000 samples, in runs of 56 or 57 samples (1136 / 20), and
//     10 or 11 audio_pwm edges in 12000 cycles;
//     a key with no note gives 0 samples for the whole note;
//   - idle with the piano enabled gives 0 samples; disabled gives none and
//     takes no characters;
//   - with the transmit FIFO full the echo waits (and happens once there is
//     room); with the sample FIFO full no sample is written;
//   - audio_pwm is low when idle.
module piano_fsm_tb;
  import piano_pkg::*;
  localparam int CLK_HZ = 1_000_000, SP = 20, L0 = 12000, STEP = 500;
  logic clk = 0, rst = 1, enable = 0;
  int checks = 0, failures = 0;

  // UART RX FIFO (written by the test).
  logic  rx_wr = 0, rx_full, rx_rd, rx_empty;
  char_t rx_din = '0, rx_dout;
  // UART TX FIFO (read by the test).
  logic  tx_wr, tx_full, tx_rd, tx_empty;
  char_t tx_din, tx_dout;
  // Sample FIFO (drained by the test).
  logic  s_wr, s_full, s_rd = 0, s_empty;
  pcm_t  s_din, s_dout;
  logic  up = 0, down = 0, pwm;

  fifo #(.WIDTH(8), .DEPTH(8)) u_rx (.clk(clk), .rst(rst), .wr_en(rx_wr), .din(rx_din), .full(rx_full),
                                     .rd_en(rx_rd), .dout(rx_dout), .empty(rx_empty));
  fifo #(.WIDTH(8), .DEPTH(8)) u_tx (.clk(clk), .rst(rst), .wr_en(tx_wr), .din(tx_din), .full(tx_full),
                                     .rd_en(tx_rd), .dout(tx_dout), .empty(tx_empty));
  fifo #(.WIDTH(SAMPLE_WIDTH), .DEPTH(8)) u_s (.clk(clk), .rst(rst), .wr_en(s_wr), .din(s_din), .full(s_full),
                                     .rd_en(s_rd), .dout(s_dout), .empty(s_empty));

  piano_fsm #(.CLOCK_FREQ(CLK_HZ), .SAMPLE_RATE(CLK_HZ / SP),
              .NOTE_LENGTH_DEFAULT(L0), .NOTE_LENGTH_STEP(STEP)) dut (
    .clk(clk), .rst(rst), .enable(enable),
    .ua_rx_dout(rx_dout), .ua_rx_empty(rx_empty), .ua_rx_rd_en(rx_rd),
    .ua_tx_din(tx_din), .ua_tx_full(tx_full), .ua_tx_wr_en(tx_wr),
    .i2s_din(s_din), .i2s_full(s_full), .i2s_wr_en(s_wr),
    .note_length_up(up), .note_length_down(down), .audio_pwm(pwm)
  );

  always #500 clk = ~clk;   // 1 MHz

  initial begin
    #1s;
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

  // Monitors.
  longint cyc = 0;
  longint echo_t [$];
  char_t  echoed [$];
  pcm_t   samples [$];
  longint sample_t [$];
  int     full_waits = 0, wr_when_full = 0, pwm_edges = 0;
  logic   pwm_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (tx_wr) begin echo_t.push_back(cyc); echoed.push_back(tx_din); end
    if (s_wr) begin
      if (s_full) wr_when_full++;
      samples.push_back(s_din);
      sample_t.push_back(cyc);
    end
    if (s_full && dut.pending) full_waits++;
    if (pwm != pwm_d) pwm_edges++;
    pwm_d <= pwm;
  end
  // The sample FIFO is drained every cycle unless the test holds it.
  logic hold_samples = 0;
  always @(negedge clk) s_rd = !hold_samples;
  // Likewise the transmit FIFO, unless held or read by hand.
  logic hold_tx = 0, tx_rd_manual = 0;
  always @(negedge clk) tx_rd = hold_tx ? tx_rd_manual : 1'b1;

  task automatic type_char(input char_t c);
    @(negedge clk);
    rx_wr = 1; rx_din = c;
    @(negedge clk);
    rx_wr = 0;
  endtask

  task automatic pulse_up();
    @(negedge clk) up = 1;
    @(negedge clk) up = 0;
  endtask

  task automatic pulse_down();
    @(negedge clk) down = 1;
    @(negedge clk) down = 0;
  endtask

  // Note-length check from two queued characters' echo times.
  task automatic timed_pair(input int expect_len);
    longint d;
    int n0;
    n0 = echo_t.size();
    type_char("z"); type_char("x");
    wait (echo_t.size() == n0 + 2);
    d = echo_t[n0 + 1] - echo_t[n0];
    check(d >= expect_len && d <= expect_len + 5,
          $sformatf("note length %0d: echoes %0d cycles apart", expect_len, d));
    repeat (expect_len + 20) @(negedge clk);
  endtask

  initial begin
    int n0, run, runs_ok, runs_bad;
    pcm_t prev;
    repeat (5) @(negedge clk);
    rst = 0;

    // Disabled: characters stay in the FIFO, no samples.
    type_char("q");
    repeat (200) @(negedge clk);
    check(echoed.size() == 0 && samples.size() == 0 && !rx_empty, "disabled does nothing");

    // Enabled and idle after the queued 'q' has played.
    enable = 1;
    wait (echoed.size() == 1);
    check(echoed[0] == "q", "echo q");
    repeat (L0 + 50) @(negedge clk);
    n0 = samples.size();
    repeat (100 * SP) @(negedge clk);
    check(samples.size() - n0 >= 99 && samples.size() - n0 <= 101, $sformatf("idle sample count %0d", samples.size() - n0));
    for (int i = n0; i < samples.size(); i++) check(samples[i] == PCM_ZERO, "idle samples are 0");
    for (int i = n0 + 1; i < samples.size(); i++)
      check(sample_t[i] - sample_t[i-1] == SP, "sample spacing");
    check(pwm == 0, "pwm low when idle");

    // A note: 'n' = A4.
    n0 = samples.size();
    pwm_edges = 0;
    type_char("n");
    repeat (L0 + 100) @(negedge clk);
    check(echoed[$] == "n", "echo n");
    // Runs of equal samples = half periods of the wave; the last one is cut
    // short by the end of the note and is not counted.
    run = 0; runs_ok = 0; runs_bad = 0; prev = PCM_ZERO;
    for (int i = n0; i < samples.size(); i++) begin
      pcm_t v;
      v = samples[i];
      if (v != PCM_ZERO) begin
        check(v == PCM_MAX || v == PCM_MIN, "note samples are full scale");
        if (run > 0 && v != prev) begin
          if (run == 56 || run == 57) runs_ok++; else runs_bad++;
          run = 0;
        end
        run++;
        prev = v;
      end
    end
    check(runs_ok >= 9 && runs_bad == 0, $sformatf("square-wave runs ok=%0d bad=%0d", runs_ok, runs_bad));
    check(pwm_edges >= 10 && pwm_edges <= 11, $sformatf("pwm edges %0d", pwm_edges));

    // A key without a note: 0 samples, echoed.
    n0 = samples.size();
    type_char("a");
    repeat (L0 + 100) @(negedge clk);
    check(echoed[$] == "a", "echo a");
    for (int i = n0; i < samples.size(); i++) check(samples[i] == PCM_ZERO, "non-note plays 0");

    // note_length: default, up twice, down three times, then many downs.
    timed_pair(L0);
    pulse_up(); pulse_up();
    timed_pair(L0 + 2 * STEP);
    pulse_down(); pulse_down(); pulse_down();
    timed_pair(L0 - STEP);
    repeat (40) pulse_down();
    timed_pair(STEP);

    // Transmit FIFO full: 8 echoes fill it, the 9th waits.
    repeat (10) pulse_up();   // back to a longer note: 5500 cycles
    hold_tx = 1;
    n0 = echoed.size();
    for (int i = 0; i < 9; i++) type_char(char_t'("0" + i));
    wait (echoed.size() == n0 + 8);
    begin
      // The 9th character is pulled after the 8th note and then waits.
      repeat (STEP * 11 + 200) @(negedge clk);
      check(rx_empty, "9th character taken");
      check(echoed.size() == n0 + 8 && tx_full, "echo waits on full TX FIFO");
      // Read one: the echo goes through.
      @(negedge clk) tx_rd_manual = 1;
      @(negedge clk) tx_rd_manual = 0;
      repeat (3) @(negedge clk);
      check(echoed.size() == n0 + 9 && echoed[$] == "8", "echo after room");
    end
    // Drain TX FIFO and check all echoes in order.
    hold_tx = 0;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 9; i++) check(echoed[n0 + i] == char_t'("0" + i), "echo order");

    // Sample FIFO full: stop draining for a while.
    hold_samples = 1;
    repeat (30 * SP) @(negedge clk);
    check(s_full, "sample FIFO fills");
    hold_samples = 0;
    repeat (20 * SP) @(negedge clk);
    check(full_waits > 0, "FSM waited on full sample FIFO");
    check(wr_when_full == 0, "no write into a full FIFO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
