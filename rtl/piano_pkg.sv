// Shared constants of the UART piano.
//
// The audio path carries 20-bit two's-complement PCM samples. The piano plays
// square waves, so only three sample values are ever produced: the most
// positive code for the high half of the wave, the most negative code for the
// low half, and zero for silence. Characters are 8-bit ASCII codes and a note
// is described by its tone_switch_period, the number of system-clock cycles in
// half a period of the square wave (24 bits wide, as in the 256 x 24 scale ROM).
package piano_pkg;
  localparam int SAMPLE_WIDTH = 20;
  localparam int CHAR_WIDTH   = 8;
  localparam int PERIOD_WIDTH = 24;

  typedef logic [SAMPLE_WIDTH-1:0] pcm_t;
  typedef logic [CHAR_WIDTH-1:0]   char_t;
  typedef logic [PERIOD_WIDTH-1:0] period_t;

  // 0x7FFFF and 0x80000 for 20-bit samples.
  localparam pcm_t PCM_MAX  = {1'b0, {(SAMPLE_WIDTH-1){1'b1}}};
  localparam pcm_t PCM_MIN  = {1'b1, {(SAMPLE_WIDTH-1){1'b0}}};
  localparam pcm_t PCM_ZERO = '0;
endpackage
