// UART: a transmitter and a receiver sharing a clock and a baud rate.
//
// The transmit side takes bytes through a ready/valid input (data_in,
// data_in_valid, data_in_ready) and drives serial_out; the receive side
// drives a ready/valid output (data_out, data_out_valid, data_out_ready) from
// serial_in. See uart_transmitter and uart_receiver for the timing. The port
// names follow the lab's block diagram.
module uart #(
  parameter int CLOCK_FREQ = 125_000_000,
  parameter int BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       reset,

  input  logic [7:0] data_in,
  input  logic       data_in_valid,
  output logic       data_in_ready,

  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready,

  input  logic       serial_in,
  output logic       serial_out
);
  uart_transmitter #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_tx (
    .clk(clk), .rst(reset),
    .data_in(data_in), .data_in_valid(data_in_valid), .data_in_ready(data_in_ready),
    .serial_out(serial_out)
  );

  uart_receiver #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_rx (
    .clk(clk), .rst(reset),
    .serial_in(serial_in),
    .data_out(data_out), .data_out_valid(data_out_valid), .data_out_ready(data_out_ready)
  );
endmodule
