// UART receiver, 8N1.
//
// While idle the receiver waits for the line to go low (start bit). It then
// samples the line in the middle of each bit, CLOCK_FREQ / BAUD_RATE cycles
// apart: the start bit (a high sample there is taken as a glitch and the
// receiver returns to idle), eight data bits LSB first and the stop bit. At
// the middle of the stop bit the byte is placed on data_out and
// data_out_valid rises; it stays up until a cycle with data_out_ready high.
// A byte that completes while the previous one is still unread replaces it.
// serial_in must already be synchronised to clk. rst is synchronous.
module uart_receiver #(
  parameter int CLOCK_FREQ = 125_000_000,
  parameter int BAUD_RATE  = 115_200
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       serial_in,
  output logic [7:0] data_out,
  output logic       data_out_valid,
  input  logic       data_out_ready
);
  localparam int CPB = CLOCK_FREQ / BAUD_RATE;
  localparam int CW  = $clog2(CPB + 1);

  logic          busy;
  logic [3:0]    bit_idx;   // 0 start, 1..8 data, 9 stop
  logic [CW-1:0] cnt;
  logic [7:0]    shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy           <= 1'b0;
      bit_idx        <= '0;
      cnt            <= '0;
      shreg          <= '0;
      data_out       <= '0;
      data_out_valid <= 1'b0;
    end else begin
      if (data_out_valid && data_out_ready) data_out_valid <= 1'b0;

      if (!busy) begin
        if (!serial_in) begin
          busy    <= 1'b1;
          bit_idx <= '0;
          cnt     <= CW'(CPB / 2);   // first sample lands mid start bit
        end
      end else if (cnt == CW'(CPB - 1)) begin
        cnt <= '0;
        if (bit_idx == 4'd0) begin
          if (serial_in) busy <= 1'b0;          // glitch, not a start bit
          else bit_idx <= 4'd1;
        end else if (bit_idx <= 4'd8) begin
          shreg   <= {serial_in, shreg[7:1]};
          bit_idx <= bit_idx + 1'b1;
        end else begin
          busy           <= 1'b0;
          data_out       <= shreg;
          data_out_valid <= 1'b1;
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
