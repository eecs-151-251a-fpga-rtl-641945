// I2S transmitter that takes its PCM samples from a FIFO.
//
// Everything runs on clk, the audio-domain clock. Three nested counters divide
// it: CLK_PER_MCLK clk cycles make one MCLK period, MCLK_PER_SCLK MCLK periods
// make one bit-clock (SCLK) period, and SCLK_PER_FRAME bit slots make one
// LRCK frame. With the defaults (2, 4, 64) a 24.576 MHz clock gives
// MCLK = 12.288 MHz, SCLK = 3.072 MHz and 48 kHz frames. LRCK is low for the
// first half of the frame (left channel) and high for the second (right).
// SCLK is low in the first half of each slot and rises in its middle, so SDIN
// and LRCK change on falling SCLK edges and are stable at rising ones.
//
// One sample is pulled per frame: in the first clk cycle of the last bit slot
// the controller raises pcm_data_ready (the FIFO's rd_en) if the FIFO is not
// empty, and one cycle later loads pcm_data into its sample register. If the
// FIFO was empty the register keeps the last sample, which is sent again.
// In each half frame the sample goes out MSB first in slots 1 to SAMPLE_WIDTH,
// i.e. starting in the second bit-clock period after the LRCK transition, as
// I2S requires; the remaining slots carry 0. Both channels carry the same
// sample. All four outputs are registered (one clk cycle after the counters).
// rst is synchronous to clk and clears the counters and the sample.
//
// Pulling one sample per frame, the I2S bit alignment and repeating the last
// sample on an empty FIFO follow the lab; the clock ratios, the mono
// duplication and the moment of the pull are this design's choices.
module i2s_controller
  import piano_pkg::*;
#(
  parameter int CLK_PER_MCLK   = 2,
  parameter int MCLK_PER_SCLK  = 4,
  parameter int SCLK_PER_FRAME = 64
) (
  input  logic clk,
  input  logic rst,

  input  pcm_t pcm_data,
  input  logic pcm_empty,
  output logic pcm_data_ready,

  output logic mclk,
  output logic sclk,
  output logic lrck,
  output logic sdin
);
  localparam int HALF = SCLK_PER_FRAME / 2;
  localparam int MW   = $clog2(CLK_PER_MCLK);
  localparam int SW   = $clog2(MCLK_PER_SCLK);
  localparam int BW   = $clog2(SCLK_PER_FRAME);

  logic [MW-1:0] mclk_ph;
  logic [SW-1:0] sclk_ph;
  logic [BW-1:0] bit_cnt;
  logic          mclk_wrap, sclk_wrap;
  pcm_t          sample;
  logic          pulled;

  assign mclk_wrap = (mclk_ph == MW'(CLK_PER_MCLK - 1));
  assign sclk_wrap = mclk_wrap && (sclk_ph == SW'(MCLK_PER_SCLK - 1));

  // Pull request: first clk cycle of the frame's last bit slot.
  assign pcm_data_ready = !rst && !pcm_empty && (bit_cnt == BW'(SCLK_PER_FRAME - 1)) &&
                          (sclk_ph == '0) && (mclk_ph == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      mclk_ph <= '0;
      sclk_ph <= '0;
      bit_cnt <= '0;
    end else begin
      mclk_ph <= mclk_wrap ? '0 : mclk_ph + 1'b1;
      if (mclk_wrap) sclk_ph <= (sclk_ph == SW'(MCLK_PER_SCLK - 1)) ? '0 : sclk_ph + 1'b1;
      if (sclk_wrap) bit_cnt <= (bit_cnt == BW'(SCLK_PER_FRAME - 1)) ? '0 : bit_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pulled <= 1'b0;
      sample <= PCM_ZERO;
    end else begin
      pulled <= pcm_data_ready;
      if (pulled) sample <= pcm_data;
    end
  end

  // Output decode, registered.
  logic [BW-1:0] slot;
  logic          data_bit;

  always_comb begin
    slot     = (bit_cnt >= BW'(HALF)) ? bit_cnt - BW'(HALF) : bit_cnt;
    data_bit = 1'b0;
    if (slot >= BW'(1) && slot <= BW'(SAMPLE_WIDTH))
      data_bit = sample[SAMPLE_WIDTH - int'(slot)];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mclk <= 1'b0;
      sclk <= 1'b0;
      lrck <= 1'b0;
      sdin <= 1'b0;
    end else begin
      mclk <= (mclk_ph >= MW'(CLK_PER_MCLK / 2));
      sclk <= (sclk_ph >= SW'(MCLK_PER_SCLK / 2));
      lrck <= (bit_cnt >= BW'(HALF));
      sdin <= data_bit;
    end
  end

  initial assert (CLK_PER_MCLK >= 2 && MCLK_PER_SCLK >= 2 &&
                  SCLK_PER_FRAME >= 2 * (SAMPLE_WIDTH + 1) && SCLK_PER_FRAME % 2 == 0)
    else $error("i2s_controller: clock ratios too small for the sample width");
endmodule
