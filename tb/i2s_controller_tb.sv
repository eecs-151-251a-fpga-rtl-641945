// i2s_controller fed by a fifo, at its default clock ratios (clk/2 = MCLK,
// MCLK/4 = SCLK, 64 SCLK per frame). The testbench acts as the codec: on
// every rising SCLK edge it shifts in SDIN and, after each LRCK transition,
// takes bits 2..21 (the second to 21st SCLK period of the half frame) as the
// 20-bit sample of that channel. It checks:
//   - MCLK period 2 clk cycles, SCLK period 8, LRCK period 512 (one frame);
//   - each frame carries the next sample from the FIFO on both channels,
//     MSB first, with the unused slots 0;
//   - exactly one FIFO read per frame while data are there;
//   - when the FIFO runs empty the last sample is repeated, and new data
//     are picked up again when they arrive.
module i2s_controller_tb;
  import piano_pkg::*;
  localparam int FRAME = 2 * 4 * 64;
  logic clk = 0, rst = 1;
  logic wr_en = 0, full, empty, rd_en;
  pcm_t din = '0, dout;
  logic mclk, sclk, lrck, sdin;
  int checks = 0, failures = 0;
  pcm_t expected [$];
  pcm_t last_sample = '0;
  int reads = 0, repeats = 0, frames = 0;

  fifo #(.WIDTH(SAMPLE_WIDTH), .DEPTH(8)) u_fifo (
    .clk(clk), .rst(rst), .wr_en(wr_en), .din(din), .full(full),
    .rd_en(rd_en), .dout(dout), .empty(empty)
  );

  i2s_controller dut (
    .clk(clk), .rst(rst), .pcm_data(dout), .pcm_empty(empty), .pcm_data_ready(rd_en),
    .mclk(mclk), .sclk(sclk), .lrck(lrck), .sdin(sdin)
  );

  always #5 clk = ~clk;

  initial begin
    #3ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("%t: FAIL %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rd_en && !empty) reads++;

  // Clock period checks, measured in clk cycles between rising edges.
  int cyc = 0, last_m = -1, last_s = -1, last_l = -1;
  logic pm = 0, ps = 0, pl = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (mclk && !pm) begin
        if (last_m >= 0) check(cyc - last_m == 2, "MCLK period");
        last_m = cyc;
      end
      if (sclk && !ps) begin
        if (last_s >= 0) check(cyc - last_s == 8, "SCLK period");
        last_s = cyc;
      end
      if (lrck && !pl) begin
        if (last_l >= 0) check(cyc - last_l == FRAME, $sformatf("frame %0d cycles", cyc - last_l));
        last_l = cyc;
      end
    end
    pm = mclk; ps = sclk; pl = lrck;
  end

  // Codec model.
  int   bitpos = 0;
  logic lr_prev = 0;
  pcm_t sh, left;
  logic spare;
  always @(posedge sclk) begin
    if (lrck != lr_prev) bitpos = 0;
    lr_prev = lrck;
    bitpos++;
    if (bitpos >= 2 && bitpos <= SAMPLE_WIDTH + 1) sh = {sh[SAMPLE_WIDTH-2:0], sdin};
    else spare = sdin;
    if (bitpos > SAMPLE_WIDTH + 1) check(sdin == 0, "unused slot is 0");
    if (bitpos == SAMPLE_WIDTH + 1) begin
      if (!lrck) left = sh;
      else begin
        pcm_t e;
        frames++;
        check(left == sh, "both channels equal");
        if (frames >= 2) begin
          if (expected.size() > 0) begin
            e = expected.pop_front();
            last_sample = e;
          end else begin
            e = last_sample;
            repeats++;
          end
          check(sh == e, $sformatf("frame %0d: sample %h expected %h", frames, sh, e));
        end
      end
    end
  end

  task automatic push(input pcm_t v);
    @(negedge clk);
    wr_en = 1; din = v;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    // The first frame after reset carries 0 and is not checked; the first
    // sample is pulled at its end.
    repeat (6) begin
      pcm_t v;
      v = pcm_t'($urandom);
      push(v);
      expected.push_back(v);
    end
    push(PCM_MAX); expected.push_back(PCM_MAX);
    push(PCM_MIN); expected.push_back(PCM_MIN);
    // Let the FIFO run dry for a few frames (last value repeated).
    wait (expected.size() == 0);
    repeat (4 * FRAME) @(negedge clk);
    check(repeats >= 3, $sformatf("%0d repeated frames", repeats));
    // Refill, one sample per frame time.
    repeat (5) begin
      pcm_t v;
      v = pcm_t'($urandom);
      push(v);
      expected.push_back(v);
      repeat (FRAME) @(negedge clk);
    end
    wait (expected.size() == 0);
    repeat (2 * FRAME) @(negedge clk);
    check(reads == 13, $sformatf("%0d FIFO reads for 13 samples", reads));
    check(frames >= 20, "frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
