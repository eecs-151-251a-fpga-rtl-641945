// Counter-based debouncer for mechanical push buttons.
//
// A free-running counter produces a sample tick every SAMPLE_CNT_MAX cycles.
// On each tick every input bit is looked at: a high sample increments that
// bit's saturating counter, a low sample clears it. The output bit is high
// while the counter has reached PULSE_CNT_MAX, i.e. after the input has been
// seen high on PULSE_CNT_MAX consecutive ticks (150 x 25000 cycles = 30 ms at
// 125 MHz). The input must already be synchronised. The structure and both
// counts are this design's choice; registers start at 0 by initial value.
module debouncer #(
  parameter int WIDTH          = 1,
  parameter int SAMPLE_CNT_MAX = 25000,
  parameter int PULSE_CNT_MAX  = 150
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] glitchy_signal,
  output logic [WIDTH-1:0] debounced_signal
);
  localparam int SW = $clog2(SAMPLE_CNT_MAX + 1);
  localparam int PW = $clog2(PULSE_CNT_MAX + 1);

  logic [SW-1:0] sample_cnt = '0;
  logic          tick;
  logic [PW-1:0] pulse_cnt [WIDTH] = '{default: '0};

  assign tick = (sample_cnt == SW'(SAMPLE_CNT_MAX - 1));

  always_ff @(posedge clk) begin
    sample_cnt <= tick ? '0 : sample_cnt + 1'b1;
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    always_ff @(posedge clk) begin
      if (tick) begin
        if (!glitchy_signal[i])
          pulse_cnt[i] <= '0;
        else if (pulse_cnt[i] != PW'(PULSE_CNT_MAX))
          pulse_cnt[i] <= pulse_cnt[i] + 1'b1;
      end
    end
    assign debounced_signal[i] = (pulse_cnt[i] == PW'(PULSE_CNT_MAX));
  end
endmodule
