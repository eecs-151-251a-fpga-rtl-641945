// Button parser: turns raw push-button levels into one-cycle press pulses.
//
// Each button goes through a two-flip-flop synchronizer, then the debouncer,
// then a rising-edge detector, in that order, so a press held for longer than
// the debounce time produces a single pulse on out. Latency from a clean press
// to the pulse is 2 + about SAMPLE_CNT_MAX*PULSE_CNT_MAX + 1 cycles. The chain
// is as the design's block diagram draws it; the debounce counts are this
// design's choice.
module button_parser #(
  parameter int WIDTH          = 4,
  parameter int SAMPLE_CNT_MAX = 25000,
  parameter int PULSE_CNT_MAX  = 150
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);
  logic [WIDTH-1:0] synced, debounced;

  synchronizer #(.WIDTH(WIDTH)) u_sync (
    .async_signal(in), .clk(clk), .sync_signal(synced)
  );

  debouncer #(
    .WIDTH(WIDTH), .SAMPLE_CNT_MAX(SAMPLE_CNT_MAX), .PULSE_CNT_MAX(PULSE_CNT_MAX)
  ) u_debounce (
    .clk(clk), .glitchy_signal(synced), .debounced_signal(debounced)
  );

  edge_detector #(.WIDTH(WIDTH)) u_edge (
    .clk(clk), .signal_in(debounced), .edge_detect_pulse(out)
  );
endmodule
