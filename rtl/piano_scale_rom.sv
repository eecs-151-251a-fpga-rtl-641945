// Piano scale ROM: 256 x 24, ASCII code in, tone_switch_period out.
//
// Two chromatic octaves are laid on the computer keyboard the way tracker
// programs do it: the row "z s x d c v g b h n j m ," plays C4 up to C5 and
// "q 2 w 3 e r 5 t 6 y 7 u i" plays C5 up to C6 (letters and their upper-case
// forms both work). Every other code maps to 0, which the piano treats as
// silence. For semitone n above C4 the note frequency is
//   f(n) = 440 Hz * 2^((n - 9) / 12)
// and the stored value is the half period in clock cycles,
//   tone_switch_period = round(CLOCK_FREQ / (2 * f(n))),
// computed while the design is elaborated. The read is combinational.
// The ROM's shape (256 entries of 24 bits) follows the lab; the key layout
// and the equal-tempered scale are this design's choice.
module piano_scale_rom
  import piano_pkg::*;
#(
  parameter int CLOCK_FREQ = 125_000_000
) (
  input  char_t   address,
  output period_t data
);
  typedef period_t rom_t [256];

  // Semitone offset from C4 for a key, or -1 when the key plays no note.
  function automatic int semitone(input int code);
    string low  = "zsxdcvgbhnjm,";
    string high = "q2w3er5t6y7ui";
    int c = code;
    if (c >= "A" && c <= "Z") c = c + ("a" - "A");
    for (int i = 0; i < 13; i++) begin
      if (c == int'(low[i]))  return i;
      if (c == int'(high[i])) return i + 12;
    end
    return -1;
  endfunction

  function automatic rom_t build_rom();
    rom_t r;
    for (int code = 0; code < 256; code++) begin
      int n = semitone(code);
      if (n < 0) r[code] = '0;
      else begin
        real f = 440.0 * (2.0 ** ((real'(n) - 9.0) / 12.0));
        r[code] = period_t'($rtoi(real'(CLOCK_FREQ) / (2.0 * f) + 0.5));
      end
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = ROM[address];
endmodule
