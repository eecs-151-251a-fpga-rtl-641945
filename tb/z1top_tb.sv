// End-to-end test of the UART piano at reduced rates: the system clock is
// treated as 1 MHz for the piano's arithmetic (CLOCK_FREQ 1e6), 16 clocks per
// UART bit, a sample every 20 clocks, note_length 3000 clocks (step 500),
// debounce 4 x 3 clocks, and a short I2S frame (MCLK = clk/2, SCLK = MCLK/2,
// 48 bit slots). The testbench types on the serial line, decodes the echo on
// FPGA_SERIAL_TX, plays codec on MCLK/SCLK/LRCK/SDIN and watches AUD_PWM.
// The audio clock runs first faster and then slower than the sample rate, so
// the sample FIFO both runs empty and fills. Checked and counted:
//   echo          every typed character comes back unchanged and in order
//   note          a note key gives full-scale I2S samples of both signs and
//                 AUD_PWM toggling (only while SWITCHES[1] is on)
//   rx_full       typing faster than notes play fills the receive FIFO and
//                 every buffered character is still played and echoed
//   i2s_empty     the I2S controller finds the sample FIFO empty and repeats
//   i2s_full      the piano waits on a full sample FIFO
//   note_up/down  the note-length buttons change the spacing of notes
//   reset         the reset button restores the default note length
//   disabled      with SWITCHES[0] off no character is taken
// A mechanism that never occurred counts as a failure.
module z1top_tb;
  import piano_pkg::*;
  localparam int CPB = 16, L0 = 3000, STEP = 500;
  logic clk = 0, aclk = 0;
  logic [3:0] buttons = '0;
  logic [1:0] switches = 2'b00;
  logic rx_line = 1, tx_line, pwm, mclk, lrck, sclk, sdin;
  realtime ahalf = 0.45ns;
  int checks = 0, failures = 0;

  z1top #(
    .CLOCK_FREQ(1_000_000), .BAUD_RATE(1_000_000 / CPB), .FIFO_DEPTH(8),
    .SAMPLE_RATE(50_000), .NOTE_LENGTH_DEFAULT(L0), .NOTE_LENGTH_STEP(STEP),
    .DEBOUNCE_SAMPLE_CNT(4), .DEBOUNCE_PULSE_CNT(3),
    .CLK_PER_MCLK(2), .MCLK_PER_SCLK(2), .SCLK_PER_FRAME(48), .RESET_CYCLES(16)
  ) dut (
    .CLK_125MHZ_FPGA(clk), .AUDIO_CLK(aclk), .BUTTONS(buttons), .SWITCHES(switches),
    .FPGA_SERIAL_RX(rx_line), .FPGA_SERIAL_TX(tx_line), .AUD_PWM(pwm),
    .MCLK(mclk), .LRCK(lrck), .SCLK(sclk), .SDIN(sdin)
  );

  always #5 clk = ~clk;
  always #(ahalf) aclk = ~aclk;

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

  // ---------------- serial line ----------------
  byte typed [$];
  byte echoed [$];

  task automatic send(input byte c);
    logic [9:0] f;
    f = {1'b1, c, 1'b0};
    typed.push_back(c);
    for (int k = 0; k < 10; k++) begin
      rx_line = f[k];
      repeat (CPB) @(negedge clk);
    end
  endtask

  initial begin
    forever begin
      byte c;
      @(negedge tx_line);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        c[k] = tx_line;
        repeat (CPB) @(posedge clk);
      end
      echoed.push_back(c);
    end
  end

  // ---------------- codec model ----------------
  int   bitpos = 0;
  logic lr_prev = 0;
  pcm_t sh;
  int   n_max = 0, n_min = 0, n_other = 0, frames = 0;
  always @(posedge sclk) begin
    if (lrck != lr_prev) bitpos = 0;
    lr_prev = lrck;
    bitpos++;
    if (bitpos >= 2 && bitpos <= SAMPLE_WIDTH + 1) sh = {sh[SAMPLE_WIDTH-2:0], sdin};
    if (bitpos == SAMPLE_WIDTH + 1 && lrck) begin
      frames++;
      if (sh == PCM_MAX) n_max++;
      else if (sh == PCM_MIN) n_min++;
      else if (sh != PCM_ZERO) begin n_other++; $display("%t odd sample %h", $time, sh); end
    end
  end

  // ---------------- mechanism counters (internal strobes) ----------------
  int c_rx_full = 0, c_i2s_empty = 0, c_i2s_full = 0, pwm_edges = 0;
  longint cyc = 0;
  longint echo_wr_t [$];
  logic pwm_d = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.rx_fifo_full) c_rx_full++;
    if (dut.i2s_fifo_full && dut.u_piano.pending) c_i2s_full++;
    if (dut.tx_fifo_wr_en) echo_wr_t.push_back(cyc);
    if (pwm != pwm_d) pwm_edges++;
    pwm_d <= pwm;
  end
  always @(posedge aclk)
    if (dut.u_i2s.bit_cnt == 6'd47 && dut.u_i2s.sclk_ph == '0 && dut.u_i2s.mclk_ph == '0 &&
        dut.i2s_fifo_empty && !dut.audio_reset)
      c_i2s_empty++;

  task automatic press(input int b);
    @(negedge clk) buttons[b] = 1;
    repeat (40) @(negedge clk);
    buttons[b] = 0;
    repeat (40) @(negedge clk);
  endtask

  // Spacing of the echoes of two characters typed back to back.
  task automatic spacing(input int expect_len, input string what);
    int n0;
    longint d;
    n0 = echo_wr_t.size();
    send("z"); send("x");
    wait (echo_wr_t.size() == n0 + 2);
    d = echo_wr_t[n0 + 1] - echo_wr_t[n0];
    check(d >= expect_len && d <= expect_len + 5, $sformatf("%s: notes %0d apart, expected %0d", what, d, expect_len));
    repeat (expect_len + 30 * CPB) @(negedge clk);
  endtask

  initial begin
    int e0, f0, m0, edges0;
    repeat (100) @(negedge clk);

    // Disabled: nothing taken.
    send("q");
    repeat (20 * CPB) @(negedge clk);
    check(echoed.size() == 0 && !dut.rx_fifo_empty, "disabled: character waits");

    // Enable, PWM output off: the queued note plays on I2S only.
    switches = 2'b01;
    m0 = n_max + n_min;
    repeat (L0 + 30 * CPB) @(negedge clk);
    check(echoed.size() == 1, "echo of q");
    check(n_max + n_min > m0 && pwm_edges == 0, "note on I2S, AUD_PWM off");

    // PWM on: a note gives both sample signs and a toggling AUD_PWM.
    switches = 2'b11;
    m0 = n_max; f0 = n_min; edges0 = pwm_edges;
    send("i");
    repeat (L0 + 30 * CPB) @(negedge clk);
    check(n_max > m0 && n_min > f0, "note: both full-scale samples");
    check(pwm_edges - edges0 >= 4, $sformatf("note: %0d AUD_PWM edges", pwm_edges - edges0));
    check(n_other == 0, "no sample other than 0 and full scale");
    check(pwm == 0, "AUD_PWM low after the note");
    check(c_i2s_empty > 0, "fast audio clock: FIFO found empty");

    // Slow audio clock: the sample FIFO fills, the piano waits.
    ahalf = 0.65ns;
    send("w");
    repeat (L0 + 30 * CPB) @(negedge clk);
    check(c_i2s_full > 0, "slow audio clock: piano waited on a full FIFO");
    ahalf = 0.5ns;

    // Note length buttons.
    spacing(L0, "default note length");
    press(1); press(1);
    spacing(L0 + 2 * STEP, "after two up presses");
    press(2); press(2); press(2);
    spacing(L0 - STEP, "after three down presses");

    // Reset restores the default.
    press(0);
    repeat (50) @(negedge clk);
    spacing(L0, "after reset");

    // Type 11 characters in one burst: the receive FIFO fills while notes
    // play, then drains one note at a time.
    e0 = echoed.size();
    for (int i = 0; i < 10; i++) send(byte'("a" + i));
    check(c_rx_full > 0, "receive FIFO filled");
    wait (echoed.size() == e0 + 10);
    repeat (L0 + 30 * CPB) @(negedge clk);

    check(echoed.size() == typed.size(), $sformatf("%0d typed, %0d echoed", typed.size(), echoed.size()));
    for (int i = 0; i < typed.size() && i < echoed.size(); i++)
      check(echoed[i] == typed[i], $sformatf("echo %0d: %h expected %h", i, echoed[i], typed[i]));
    $display("mechanisms: echo=%0d notes(max/min samples)=%0d/%0d rx_full=%0d i2s_empty=%0d i2s_full=%0d frames=%0d",
             echoed.size(), n_max, n_min, c_rx_full, c_i2s_empty, c_i2s_full, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
