// Full-size run of the UART piano with every parameter at its default:
// 125 MHz system clock, 115200 baud, 48 kHz samples, note_length 1/5 s,
// I2S on a 24.576 MHz audio clock (48 kHz frames). One character, 'n'
// (A4 = 440 Hz), is typed; the test checks that
//   - the echo comes back on FPGA_SERIAL_TX;
//   - AUD_PWM plays 440 Hz for 0.2 s: 175 to 177 edges, first to last edge
//     between 0.2 s - 1.2 ms and 0.2 s;
//   - the I2S stream carries about 0.2 s x 48000 = 9600 full-scale frames,
//     half of them positive, and then returns to 0.
module z1top_full_tb;
  import piano_pkg::*;
  localparam int CPB = 1085;              // 125e6 / 115200
  logic clk = 0, aclk = 0;
  logic rx_line = 1, tx_line, pwm, mclk, lrck, sclk, sdin;
  int checks = 0, failures = 0;

  z1top dut (
    .CLK_125MHZ_FPGA(clk), .AUDIO_CLK(aclk), .BUTTONS(4'b0000), .SWITCHES(2'b11),
    .FPGA_SERIAL_RX(rx_line), .FPGA_SERIAL_TX(tx_line), .AUD_PWM(pwm),
    .MCLK(mclk), .LRCK(lrck), .SCLK(sclk), .SDIN(sdin)
  );

  always #4ns clk = ~clk;                 // 125 MHz
  always #20.345ns aclk = ~aclk;          // 24.576 MHz

  initial begin
    #400ms;
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

  byte echoed [$];
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

  int      pwm_edges = 0;
  realtime first_edge = 0, last_edge = 0;
  always @(pwm) if ($realtime > 1us) begin   // ignore the power-up settling
    if (pwm_edges == 0) first_edge = $realtime;
    last_edge = $realtime;
    pwm_edges++;
  end

  int   bitpos = 0, n_max = 0, n_min = 0, n_zero = 0, n_other = 0;
  logic lr_prev = 0;
  pcm_t sh;
  always @(posedge sclk) begin
    if (lrck != lr_prev) bitpos = 0;
    lr_prev = lrck;
    bitpos++;
    if (bitpos >= 2 && bitpos <= SAMPLE_WIDTH + 1) sh = {sh[SAMPLE_WIDTH-2:0], sdin};
    if (bitpos == SAMPLE_WIDTH + 1 && lrck) begin
      if (sh == PCM_MAX) n_max++;
      else if (sh == PCM_MIN) n_min++;
      else if (sh == PCM_ZERO) n_zero++;
      else n_other++;
    end
  end

  initial begin
    logic [9:0] f;
    realtime span;
    #10us;
    f = {1'b1, 8'("n"), 1'b0};
    for (int k = 0; k < 10; k++) begin
      rx_line = f[k];
      repeat (CPB) @(negedge clk);
    end
    #240ms;
    check(echoed.size() == 1 && echoed[0] == 8'("n"), "echo of n");
    span = last_edge - first_edge;
    check(pwm_edges >= 175 && pwm_edges <= 177, $sformatf("%0d AUD_PWM edges", pwm_edges));
    check(span > 198.8ms && span <= 200ms, $sformatf("tone lasted %f ms", span / 1ms));
    check(n_max + n_min >= 9550 && n_max + n_min <= 9650, $sformatf("%0d full-scale frames", n_max + n_min));
    check(n_max > 4700 && n_min > 4700, $sformatf("%0d high, %0d low", n_max, n_min));
    check(n_other == 0, "no other sample values");
    check(sh == PCM_ZERO && pwm == 0, "silent after the note");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
