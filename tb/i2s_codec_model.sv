// Receiving end of an I2S link, for testbenches. On every rising SCLK edge
// it shifts in SDIN; bit periods 2 to SAMPLE_WIDTH+1 after each LRCK change
// form the channel's sample. For every completed right-channel sample it
// counts whether the value was the positive full-scale code, the negative
// one, zero or anything else, and it measures the LRCK period.
module i2s_codec_model
  import piano_pkg::*;
(
  input  logic sclk,
  input  logic lrck,
  input  logic sdin,
  output int   n_max,
  output int   n_min,
  output int   n_zero,
  output int   n_other,
  output realtime frame_period,
  output pcm_t last_sample
);
  int      bitpos = 0;
  logic    lr_prev = 0;
  pcm_t    sh = '0;
  realtime last_rise = 0;

  initial begin
    n_max = 0; n_min = 0; n_zero = 0; n_other = 0;
    frame_period = 0; last_sample = '0;
  end

  always @(posedge lrck) begin
    if (last_rise > 0) frame_period = $realtime - last_rise;
    last_rise = $realtime;
  end

  always @(posedge sclk) begin
    if (lrck != lr_prev) bitpos = 0;
    lr_prev = lrck;
    bitpos++;
    if (bitpos >= 2 && bitpos <= SAMPLE_WIDTH + 1) sh = {sh[SAMPLE_WIDTH-2:0], sdin};
    if (bitpos == SAMPLE_WIDTH + 1 && lrck) begin
      last_sample = sh;
      if (sh == PCM_MAX) n_max++;
      else if (sh == PCM_MIN) n_min++;
      else if (sh == PCM_ZERO) n_zero++;
      else n_other++;
    end
  end
endmodule
