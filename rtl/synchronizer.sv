// Two-flip-flop synchroniser.
//
// Each bit of async_signal passes through two flip-flops in series clocked by
// clk, which gives a metastable first stage a full cycle to settle before the
// value is used. The output follows the input two clock edges later. The
// two-register chain is the classic scheme; the flip-flops start at 0 through
// their declared initial values (as an FPGA configures them) rather than
// through a reset, which is this design's choice.
module synchronizer #(
  parameter int WIDTH = 1
) (
  input  logic [WIDTH-1:0] async_signal,
  input  logic             clk,
  output logic [WIDTH-1:0] sync_signal
);
  logic [WIDTH-1:0] stage1 = '0;
  logic [WIDTH-1:0] stage2 = '0;

  always_ff @(posedge clk) begin
    stage1 <= async_signal;
    stage2 <= stage1;
  end

  assign sync_signal = stage2;
endmodule
