// piano_scale_rom at 125 MHz. All 256 addresses are read. Keys of the two
// keyboard rows (either case) must hold the half period of their note,
// CLOCK_FREQ / (2 * 261.6256 Hz * 2^(n/12)) for semitone n above C4, within
// one cycle; every other code must hold 0. A few entries are also compared
// with hand-computed literals (A4 = 440 Hz -> 142045, A5 -> 71023, C4 ->
// 238891, C6 -> 59723).
module piano_scale_rom_tb;
  logic [7:0]  address;
  logic [23:0] data;
  int checks = 0, failures = 0;

  piano_scale_rom dut (.address(address), .data(data));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int note_of(input int code);
    string keys [2] = '{"zsxdcvgbhnjm,", "q2w3er5t6y7ui"};
    int c = (code >= 65 && code <= 90) ? code + 32 : code;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < 13; i++)
        if (c == int'(keys[r][i])) return 12 * r + i;
    return -1;
  endfunction

  task automatic lit(input byte k, input int v);
    address = k; #1;
    checks++;
    if (data != 24'(v)) begin
      failures++;
      $display("key %c: %0d expected %0d", k, data, v);
    end
  endtask

  initial begin
    int notes = 0;
    for (int code = 0; code < 256; code++) begin
      int n;
      real expect_r;
      address = 8'(code);
      #1;
      n = note_of(code);
      checks++;
      if (n < 0) begin
        if (data != 0) begin
          failures++;
          $display("code %0d: %0d expected 0", code, data);
        end
      end else begin
        notes++;
        expect_r = 125.0e6 / (2.0 * 261.6255653 * (2.0 ** (real'(n) / 12.0)));
        if (real'(data) < expect_r - 1.0 || real'(data) > expect_r + 1.0) begin
          failures++;
          $display("code %0d: %0d expected %f", code, data, expect_r);
        end
      end
    end
    checks++;
    if (notes != 46) failures++;   // 26 keys: 20 letters in two cases, 6 others
    lit("n", 142045);
    lit("y", 71023);
    lit("Z", 238891);
    lit("i", 59723);
    lit(",", 119446);
    lit("q", 119446);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
