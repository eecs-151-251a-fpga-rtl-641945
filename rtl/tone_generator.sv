// Square-wave tone generator.
//
// A counter runs from 0 to tone_switch_period-1; each time it wraps the output
// flips, so the square wave has a period of 2 * tone_switch_period cycles
// (frequency CLOCK_FREQ / (2 * tone_switch_period)). While output_enable is
// low, or the period is 0 (no note), the counter and the output are held at 0,
// so a new note always starts with the wave low. A new period takes effect at
// the next wrap. rst is synchronous. The interface follows the name the piano
// uses for a note's period; the counter design is this design's own.
module tone_generator
  import piano_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    output_enable,
  input  period_t tone_switch_period,
  output logic    square_wave_out
);
  period_t cnt;
  logic    wave;

  always_ff @(posedge clk) begin
    if (rst || !output_enable || tone_switch_period == '0) begin
      cnt  <= '0;
      wave <= 1'b0;
    end else if (cnt >= tone_switch_period - 1'b1) begin
      cnt  <= '0;
      wave <= ~wave;
    end else begin
      cnt  <= cnt + 1'b1;
    end
  end

  assign square_wave_out = wave;
endmodule
