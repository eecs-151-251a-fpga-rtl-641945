// The piano at the two other sample rates the design is meant for, 44.1 kHz
// and 88.2 kHz, at full clock rates (125 MHz, 115200 baud) with the audio
// clock at 512 times the sample rate (22.5792 and 45.1584 MHz). note_length
// is cut to 1/50 s to keep the run short. For each, one 'n' (A4 = 440 Hz) is
// typed and the test checks the LRCK frame period (1/44100 or 1/88200 s),
// the number of full-scale I2S frames (0.02 s x rate, within 1%), the
// AUD_PWM edge count (0.02 s x 880 = 17.6, so 17 or 18), and the echo.
module z1top_rates_tb;
  import piano_pkg::*;
  localparam int CPB = 1085;
  logic clk = 0, aclk44 = 0, aclk88 = 0;
  logic rx_line = 1;
  int checks = 0, failures = 0;

  logic    tx [2], pwm [2], mclk [2], lrck [2], sclk [2], sdin [2];
  int      n_max [2], n_min [2], n_zero [2], n_other [2];
  realtime fp [2];
  pcm_t    last [2];

  z1top #(.SAMPLE_RATE(44_100), .NOTE_LENGTH_DEFAULT(125_000_000 / 50)) dut44 (
    .CLK_125MHZ_FPGA(clk), .AUDIO_CLK(aclk44), .BUTTONS(4'b0000), .SWITCHES(2'b11),
    .FPGA_SERIAL_RX(rx_line), .FPGA_SERIAL_TX(tx[0]), .AUD_PWM(pwm[0]),
    .MCLK(mclk[0]), .LRCK(lrck[0]), .SCLK(sclk[0]), .SDIN(sdin[0])
  );
  z1top #(.SAMPLE_RATE(88_200), .NOTE_LENGTH_DEFAULT(125_000_000 / 50)) dut88 (
    .CLK_125MHZ_FPGA(clk), .AUDIO_CLK(aclk88), .BUTTONS(4'b0000), .SWITCHES(2'b11),
    .FPGA_SERIAL_RX(rx_line), .FPGA_SERIAL_TX(tx[1]), .AUD_PWM(pwm[1]),
    .MCLK(mclk[1]), .LRCK(lrck[1]), .SCLK(sclk[1]), .SDIN(sdin[1])
  );

  for (genvar i = 0; i < 2; i++) begin : g_codec
    i2s_codec_model u_codec (
      .sclk(sclk[i]), .lrck(lrck[i]), .sdin(sdin[i]),
      .n_max(n_max[i]), .n_min(n_min[i]), .n_zero(n_zero[i]), .n_other(n_other[i]),
      .frame_period(fp[i]), .last_sample(last[i])
    );
  end

  always #4ns clk = ~clk;
  always #22.1443ns aclk44 = ~aclk44;     // 22.5792 MHz
  always #11.0722ns aclk88 = ~aclk88;     // 45.1584 MHz

  initial begin
    #100ms;
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

  int pwm_edges [2] = '{0, 0};
  always @(pwm[0]) if ($realtime > 1us) pwm_edges[0]++;
  always @(pwm[1]) if ($realtime > 1us) pwm_edges[1]++;

  byte echo [2];
  for (genvar i = 0; i < 2; i++) begin : g_uart
    initial begin
      @(negedge tx[i]);
      repeat (CPB + CPB / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        echo[i][k] = tx[i];
        repeat (CPB) @(posedge clk);
      end
    end
  end

  initial begin
    logic [9:0] f;
    real rate [2] = '{44100.0, 88200.0};
    #10us;
    f = {1'b1, 8'("n"), 1'b0};
    for (int k = 0; k < 10; k++) begin
      rx_line = f[k];
      repeat (CPB) @(negedge clk);
    end
    #25ms;
    for (int i = 0; i < 2; i++) begin
      real expect_frames, got_rate;
      expect_frames = 0.02 * rate[i];
      got_rate = 1.0s / fp[i];
      check(got_rate > rate[i] * 0.999 && got_rate < rate[i] * 1.001, $sformatf("frame rate %f", got_rate));
      check(real'(n_max[i] + n_min[i]) > expect_frames * 0.99 && real'(n_max[i] + n_min[i]) < expect_frames * 1.01,
            $sformatf("%0d full-scale frames, expected %f", n_max[i] + n_min[i], expect_frames));
      check(pwm_edges[i] >= 17 && pwm_edges[i] <= 18, $sformatf("%0d AUD_PWM edges", pwm_edges[i]));
      check(n_other[i] == 0 && last[i] == PCM_ZERO, "only 0 and full-scale samples, silent at the end");
      check(echo[i] == 8'("n"), "echo");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
