// Piano controller: characters in, echo out, square-wave samples to I2S.
//
// States:
//   IDLE   waits for a character in the UART receive FIFO (while enabled) and
//          reads it (rx_rd_en for one cycle).
//   FETCH  the FIFO's dout now holds the character; it is latched.
//   ECHO   writes the character unchanged into the UART transmit FIFO, waiting
//          as long as that FIFO is full. The note's tone_switch_period is read
//          from piano_scale_rom.
//   PLAY   for note_length cycles the tone generator runs with that period;
//          then back to IDLE.
// Independently a sample tick comes every CLOCK_FREQ / SAMPLE_RATE cycles
// (2604 at 125 MHz and 48 kHz). At each tick the square wave is sampled: in
// PLAY a high wave gives PCM_MAX (0x7FFFF) and a low one PCM_MIN (0x80000);
// a key that is no note plays PCM 0; in IDLE with the piano enabled the
// sample is 0. The sample is written into the I2S FIFO as soon as that FIFO
// is not full; a sample still waiting at the next tick is replaced by the new
// one. The note timer does not wait for the FIFOs.
// note_length starts at NOTE_LENGTH_DEFAULT (1/5 s) and each note_length_up
// or note_length_down pulse changes it by NOTE_LENGTH_STEP, never below one
// step and never past the top of its 32-bit register. It applies from the
// next note. audio_pwm is the tone generator's square wave, low when no note
// plays. rst is synchronous; no FIFO is read or written while it is high
// (the sample FIFO it writes may have no reset of its own).
//
// The echo, the ROM lookup, the note length, its button control, waiting on
// full FIFOs and the PCM levels follow the lab; the state sequence, the
// sample pacing, the step size and the zero samples when idle are this
// design's choices.
module piano_fsm
  import piano_pkg::*;
#(
  parameter int          CLOCK_FREQ          = 125_000_000,
  parameter int          SAMPLE_RATE         = 48_000,
  parameter int unsigned NOTE_LENGTH_DEFAULT = CLOCK_FREQ / 5,
  parameter int unsigned NOTE_LENGTH_STEP    = CLOCK_FREQ / 50
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  enable,

  input  char_t ua_rx_dout,
  input  logic  ua_rx_empty,
  output logic  ua_rx_rd_en,

  output char_t ua_tx_din,
  input  logic  ua_tx_full,
  output logic  ua_tx_wr_en,

  output pcm_t  i2s_din,
  input  logic  i2s_full,
  output logic  i2s_wr_en,

  input  logic  note_length_up,
  input  logic  note_length_down,

  output logic  audio_pwm
);
  localparam int SAMPLE_PERIOD = CLOCK_FREQ / SAMPLE_RATE;
  localparam int SPW           = $clog2(SAMPLE_PERIOD + 1);

  typedef enum logic [1:0] {IDLE, FETCH, ECHO, PLAY} state_t;

  state_t        state;
  char_t         char_q;
  period_t       rom_period, period_q;
  logic [31:0]   note_length, note_cnt;
  logic [SPW-1:0] sample_cnt;
  logic          tick, wave;
  logic          pending;
  pcm_t          pending_val;

  piano_scale_rom #(.CLOCK_FREQ(CLOCK_FREQ)) u_rom (
    .address(char_q), .data(rom_period)
  );

  tone_generator u_tone (
    .clk(clk), .rst(rst), .output_enable(state == PLAY),
    .tone_switch_period(period_q), .square_wave_out(wave)
  );

  assign ua_rx_rd_en = !rst && (state == IDLE) && enable && !ua_rx_empty;
  assign ua_tx_din   = char_q;
  assign ua_tx_wr_en = !rst && (state == ECHO) && !ua_tx_full;
  assign audio_pwm   = wave;

  // Control flow.
  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      char_q   <= '0;
      period_q <= '0;
      note_cnt <= '0;
    end else begin
      unique case (state)
        IDLE:  if (ua_rx_rd_en) state <= FETCH;
        FETCH: begin
          char_q <= ua_rx_dout;
          state  <= ECHO;
        end
        ECHO: if (ua_tx_wr_en) begin
          period_q <= rom_period;
          note_cnt <= note_length;
          state    <= PLAY;
        end
        PLAY: begin
          if (note_cnt <= 32'd1) state <= IDLE;
          note_cnt <= note_cnt - 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // note_length control.
  always_ff @(posedge clk) begin
    if (rst) note_length <= NOTE_LENGTH_DEFAULT;
    else if (note_length_up && !note_length_down) begin
      if (note_length <= 32'hFFFF_FFFF - NOTE_LENGTH_STEP) note_length <= note_length + NOTE_LENGTH_STEP;
    end else if (note_length_down && !note_length_up) begin
      if (note_length >= 2 * NOTE_LENGTH_STEP) note_length <= note_length - NOTE_LENGTH_STEP;
    end
  end

  // Sample pacing and the write into the I2S FIFO.
  assign tick      = (sample_cnt == SPW'(SAMPLE_PERIOD - 1));
  assign i2s_wr_en = !rst && pending && !i2s_full;
  assign i2s_din   = pending_val;

  always_ff @(posedge clk) begin
    if (rst) begin
      sample_cnt  <= '0;
      pending     <= 1'b0;
      pending_val <= PCM_ZERO;
    end else begin
      sample_cnt <= tick ? '0 : sample_cnt + 1'b1;
      if (tick && (state == PLAY || enable)) begin
        pending <= 1'b1;
        if (state != PLAY || period_q == '0) pending_val <= PCM_ZERO;
        else pending_val <= wave ? PCM_MAX : PCM_MIN;
      end else if (i2s_wr_en) begin
        pending <= 1'b0;
      end
    end
  end

  // A character is echoed exactly once, and only while the TX FIFO has room.
  assert property (@(posedge clk) disable iff (rst) ua_tx_wr_en |-> !ua_tx_full);
  assert property (@(posedge clk) disable iff (rst) i2s_wr_en |-> !i2s_full);
endmodule
