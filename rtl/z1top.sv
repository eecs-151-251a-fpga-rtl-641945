// UART piano, top level.
//
// A character typed on a serial terminal arrives on FPGA_SERIAL_RX, is
// received by the UART and buffered in the receive FIFO. The piano FSM takes
// it from there, echoes it back through the transmit FIFO and the UART
// transmitter on FPGA_SERIAL_TX, and plays the matching note for note_length:
// it writes 20-bit square-wave PCM samples at 48 kHz into an asynchronous FIFO
// whose read side is in the audio clock domain, where the I2S controller
// pulls one sample per frame and drives MCLK, SCLK, LRCK and SDIN. The same
// square wave drives AUD_PWM, the mono audio output, while SWITCHES[1] is on.
//
// Clocks: CLK_125MHZ_FPGA runs everything but the I2S side, which runs on
// AUDIO_CLK (24.576 MHz gives 48 kHz frames with the I2S controller's
// default ratios; any clock, including the system clock itself, works, with
// the frame rate scaling with it). Only the sample FIFO crosses between them.
//
// Controls: BUTTONS go through the button parser (synchronise, debounce,
// edge-detect). BUTTONS[0] resets the design, BUTTONS[1] lengthens and
// BUTTONS[2] shortens note_length by one step; BUTTONS[3] is not used (its
// pulse output is left open). SWITCHES[0] turns the piano on
// (it takes characters and streams samples), SWITCHES[1] enables AUD_PWM.
//
// Reset: a power-on counter (registers with initial values) and the reset
// button each start a reset of RESET_CYCLES system-clock cycles. It is
// synchronous in the system domain and passes through a two-flip-flop
// synchroniser into the audio domain. The asynchronous FIFO has no reset.
//
// Glue between ready/valid and FIFO ports: the receiver's output goes into
// the receive FIFO with wr_en = valid & !full and ready = !full; the transmit
// FIFO feeds the transmitter through fifo_rv_source.
//
// The block structure and connections follow the lab's system diagram; the
// separate audio clock input, the power-on reset and the button and switch
// assignments are this design's choices.
module z1top
  import piano_pkg::*;
#(
  parameter int          CLOCK_FREQ          = 125_000_000,
  parameter int          BAUD_RATE           = 115_200,
  parameter int          FIFO_DEPTH          = 8,
  parameter int          SAMPLE_RATE         = 48_000,
  parameter int unsigned NOTE_LENGTH_DEFAULT = CLOCK_FREQ / 5,
  parameter int unsigned NOTE_LENGTH_STEP    = CLOCK_FREQ / 50,
  parameter int          DEBOUNCE_SAMPLE_CNT = 25_000,
  parameter int          DEBOUNCE_PULSE_CNT  = 150,
  parameter int          CLK_PER_MCLK        = 2,
  parameter int          MCLK_PER_SCLK       = 4,
  parameter int          SCLK_PER_FRAME      = 64,
  parameter int          RESET_CYCLES        = 64
) (
  input  logic       CLK_125MHZ_FPGA,
  input  logic       AUDIO_CLK,
  input  logic [3:0] BUTTONS,
  input  logic [1:0] SWITCHES,

  input  logic       FPGA_SERIAL_RX,
  output logic       FPGA_SERIAL_TX,

  output logic       AUD_PWM,

  output logic       MCLK,
  output logic       LRCK,
  output logic       SCLK,
  output logic       SDIN
);
  logic clk;
  assign clk = CLK_125MHZ_FPGA;

  // ---------------- buttons, switches, reset ----------------
  logic [3:0] buttons_pressed;
  logic [1:0] switches_sync;

  button_parser #(
    .WIDTH(4), .SAMPLE_CNT_MAX(DEBOUNCE_SAMPLE_CNT), .PULSE_CNT_MAX(DEBOUNCE_PULSE_CNT)
  ) u_buttons (
    .clk(clk), .in(BUTTONS), .out(buttons_pressed)
  );

  synchronizer #(.WIDTH(2)) u_switch_sync (
    .async_signal(SWITCHES), .clk(clk), .sync_signal(switches_sync)
  );

  localparam int RW = $clog2(RESET_CYCLES + 1);
  logic [RW-1:0] reset_cnt = RW'(RESET_CYCLES);
  logic          reset, audio_reset;

  always_ff @(posedge clk) begin
    if (buttons_pressed[0])   reset_cnt <= RW'(RESET_CYCLES);
    else if (reset_cnt != '0) reset_cnt <= reset_cnt - 1'b1;
  end
  assign reset = (reset_cnt != '0);

  synchronizer #(.WIDTH(1)) u_audio_reset_sync (
    .async_signal(reset), .clk(AUDIO_CLK), .sync_signal(audio_reset)
  );

  // ---------------- UART and its FIFOs ----------------
  logic  serial_rx;
  char_t uart_rx_data, uart_tx_data;
  logic  uart_rx_valid, uart_rx_ready, uart_tx_valid, uart_tx_ready;

  synchronizer #(.WIDTH(1)) u_rx_sync (
    .async_signal(FPGA_SERIAL_RX), .clk(clk), .sync_signal(serial_rx)
  );

  uart #(.CLOCK_FREQ(CLOCK_FREQ), .BAUD_RATE(BAUD_RATE)) u_uart (
    .clk(clk), .reset(reset),
    .data_in(uart_tx_data), .data_in_valid(uart_tx_valid), .data_in_ready(uart_tx_ready),
    .data_out(uart_rx_data), .data_out_valid(uart_rx_valid), .data_out_ready(uart_rx_ready),
    .serial_in(serial_rx), .serial_out(FPGA_SERIAL_TX)
  );

  char_t rx_fifo_dout, tx_fifo_din, tx_fifo_dout;
  logic  rx_fifo_full, rx_fifo_empty, rx_fifo_rd_en, rx_fifo_wr_en;
  logic  tx_fifo_full, tx_fifo_empty, tx_fifo_rd_en, tx_fifo_wr_en;

  assign uart_rx_ready = !rx_fifo_full;
  assign rx_fifo_wr_en = uart_rx_valid && !rx_fifo_full;

  fifo #(.WIDTH(CHAR_WIDTH), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk(clk), .rst(reset),
    .wr_en(rx_fifo_wr_en), .din(uart_rx_data), .full(rx_fifo_full),
    .rd_en(rx_fifo_rd_en), .dout(rx_fifo_dout), .empty(rx_fifo_empty)
  );

  fifo #(.WIDTH(CHAR_WIDTH), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk(clk), .rst(reset),
    .wr_en(tx_fifo_wr_en), .din(tx_fifo_din), .full(tx_fifo_full),
    .rd_en(tx_fifo_rd_en), .dout(tx_fifo_dout), .empty(tx_fifo_empty)
  );

  fifo_rv_source #(.WIDTH(CHAR_WIDTH)) u_tx_bridge (
    .clk(clk), .rst(reset),
    .fifo_dout(tx_fifo_dout), .fifo_empty(tx_fifo_empty), .fifo_rd_en(tx_fifo_rd_en),
    .data(uart_tx_data), .valid(uart_tx_valid), .ready(uart_tx_ready)
  );

  // ---------------- piano FSM ----------------
  pcm_t i2s_fifo_din, i2s_fifo_dout;
  logic i2s_fifo_wr_en, i2s_fifo_full, i2s_fifo_rd_en, i2s_fifo_empty;
  logic audio_pwm;

  piano_fsm #(
    .CLOCK_FREQ(CLOCK_FREQ), .SAMPLE_RATE(SAMPLE_RATE),
    .NOTE_LENGTH_DEFAULT(NOTE_LENGTH_DEFAULT), .NOTE_LENGTH_STEP(NOTE_LENGTH_STEP)
  ) u_piano (
    .clk(clk), .rst(reset), .enable(switches_sync[0]),
    .ua_rx_dout(rx_fifo_dout), .ua_rx_empty(rx_fifo_empty), .ua_rx_rd_en(rx_fifo_rd_en),
    .ua_tx_din(tx_fifo_din), .ua_tx_full(tx_fifo_full), .ua_tx_wr_en(tx_fifo_wr_en),
    .i2s_din(i2s_fifo_din), .i2s_full(i2s_fifo_full), .i2s_wr_en(i2s_fifo_wr_en),
    .note_length_up(buttons_pressed[1]), .note_length_down(buttons_pressed[2]),
    .audio_pwm(audio_pwm)
  );

  assign AUD_PWM = audio_pwm && switches_sync[1];

  // ---------------- audio clock domain ----------------
  async_fifo #(.WIDTH(SAMPLE_WIDTH), .DEPTH(FIFO_DEPTH)) u_i2s_fifo (
    .wr_clk(clk), .wr_en(i2s_fifo_wr_en), .din(i2s_fifo_din), .full(i2s_fifo_full),
    .rd_clk(AUDIO_CLK), .rd_en(i2s_fifo_rd_en), .dout(i2s_fifo_dout), .empty(i2s_fifo_empty)
  );

  i2s_controller #(
    .CLK_PER_MCLK(CLK_PER_MCLK), .MCLK_PER_SCLK(MCLK_PER_SCLK), .SCLK_PER_FRAME(SCLK_PER_FRAME)
  ) u_i2s (
    .clk(AUDIO_CLK), .rst(audio_reset),
    .pcm_data(i2s_fifo_dout), .pcm_empty(i2s_fifo_empty), .pcm_data_ready(i2s_fifo_rd_en),
    .mclk(MCLK), .sclk(SCLK), .lrck(LRCK), .sdin(SDIN)
  );
endmodule
