// UART transmitter, 8 data bits, no parity, one stop bit (8N1).
//
// data_in is taken when data_in_valid and data_in_ready are both high on a
// rising clock edge; ready is high only while the transmitter is idle. The
// frame is a low start bit, the eight data bits LSB first and a high stop
// bit, each held for CLOCK_FREQ / BAUD_RATE cycles (1085 at 125 MHz and
// 115200 baud), so one byte occupies the line for 10 bit times and ready
// returns one cycle after the stop bit ends. The line idles high. rst is
// synchronous. The baud rate follows the lab; the framing is standard.
module uart_transmitter #(
  parameter int CLOCK_FREQ = 125_000_000,
  parameter int BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,
  output logic       serial_out
);
  localparam int CPB = CLOCK_FREQ / BAUD_RATE;
  localparam int CW  = $clog2(CPB + 1);

  logic [9:0]    shreg;     // stop, data[7:0], start
  logic [3:0]    bits_left; // 0 when idle
  logic [CW-1:0] cnt;

  assign data_in_ready = (bits_left == 4'd0);
  assign serial_out    = (bits_left == 4'd0) ? 1'b1 : shreg[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      bits_left <= '0;
      cnt       <= '0;
      shreg     <= '1;
    end else if (bits_left == 4'd0) begin
      if (data_in_valid) begin
        shreg     <= {1'b1, data_in, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
      end
    end else if (cnt == CW'(CPB - 1)) begin
      cnt       <= '0;
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 1'b1;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
