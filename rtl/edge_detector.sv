// Rising-edge detector.
//
// For every bit, edge_detect_pulse is high for exactly one clock cycle after
// the cycle in which signal_in went from 0 to 1 (the input is registered and
// compared with its previous value, so the pulse is a registered output one
// cycle after the input rises). Used after the debouncer so that one button
// press gives one pulse. Only rising edges are reported; the history register
// starts at 0 by its initial value, no reset.
module edge_detector #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] signal_in,
  output logic [WIDTH-1:0] edge_detect_pulse
);
  logic [WIDTH-1:0] prev  = '0;
  logic [WIDTH-1:0] pulse = '0;

  always_ff @(posedge clk) begin
    prev  <= signal_in;
    pulse <= signal_in & ~prev;
  end

  assign edge_detect_pulse = pulse;
endmodule
