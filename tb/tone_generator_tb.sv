// tone_generator: for several periods the output must toggle exactly every
// tone_switch_period cycles (full period 2 * tone_switch_period), start low,
// and stay low while output_enable is low or the period is 0.
module tone_generator_tb;
  logic clk = 0, rst = 1, en = 0, wave;
  logic [23:0] period = '0;
  int checks = 0, failures = 0;

  tone_generator dut (.clk(clk), .rst(rst), .output_enable(en),
                      .tone_switch_period(period), .square_wave_out(wave));

  always #5 clk = ~clk;

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

  initial begin
    int plist [4] = '{1, 3, 10, 37};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    en = 1; period = 0;
    repeat (20) begin @(posedge clk); #1 check(wave == 0, "silent at period 0"); end
    foreach (plist[k]) begin
      int p = plist[k];
      int run = 0, edges = 0;
      logic last;
      en = 0;
      repeat (3) @(posedge clk);
      #1 check(wave == 0, "low while disabled");
      period = 24'(p); en = 1;
      last = wave;
      repeat (20 * p + 5) begin
        @(posedge clk); #1;
        run++;
        if (wave != last) begin
          if (edges > 0) check(run == p, $sformatf("period %0d: toggle after %0d", p, run));
          else check(wave == 1 && run == p, $sformatf("period %0d: first rise after %0d", p, run));
          edges++;
          run = 0;
          last = wave;
        end
      end
      check(edges >= 19, $sformatf("period %0d: %0d toggles", p, edges));
    end
    en = 0;
    repeat (2) @(posedge clk);
    #1 check(wave == 0, "disable stops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
