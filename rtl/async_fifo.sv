// Asynchronous FIFO: writes on wr_clk, reads on rd_clk, clocks unrelated.
//
// It is built like the synchronous FIFO, a two-port RAM with a binary write
// counter and a binary read counter (one wrap bit above the address), but the
// flag logic of each side only sees the other side's counter after it has
// crossed clock domains. A counter crosses as Gray code (bin2gray), through
// two flip-flops clocked by the destination clock, and is converted back to
// binary (gray2bin) there. Because a Gray counter changes one bit per step,
// the synchronised value is always either the old or the new count.
//   write side:  full  = write count - synchronised read count == DEPTH
//   read side:   empty = read count == synchronised write count
// The flags are conservative: full and empty may stay raised a few cycles
// after the other side has moved, but neither is ever lowered too early.
// Read data are registered, as in the synchronous FIFO: dout carries the word
// after the rd_clk edge on which rd_en was high (and not empty).
//
// There is no reset port: every register has a declared initial value, which
// an FPGA loads at configuration. The Gray crossing, the two-register
// synchronisers, the conversion back to binary and the reset-by-initial-value
// follow the lab's description; the flag comparisons are this design's.
// DEPTH must be a power of two.
module async_fifo #(
  parameter int WIDTH = 20,
  parameter int DEPTH = 8
) (
  input  logic             wr_clk,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,

  input  logic             rd_clk,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int PW = AW + 1;

  logic [WIDTH-1:0] mem [DEPTH];

  // ---------------- write clock domain ----------------
  logic [PW-1:0] wr_bin  = '0;
  logic [PW-1:0] wr_gray = '0;
  logic [PW-1:0] wr_gray_next, rd_gray_in_wr, rd_bin_in_wr;
  logic          do_write;

  assign full     = ((wr_bin - rd_bin_in_wr) == PW'(DEPTH));
  assign do_write = wr_en && !full;

  bin2gray #(.WIDTH(PW)) u_wr_b2g (.bin(wr_bin + 1'b1), .gray(wr_gray_next));

  always_ff @(posedge wr_clk) begin
    if (do_write) begin
      mem[wr_bin[AW-1:0]] <= din;
      wr_bin  <= wr_bin + 1'b1;
      wr_gray <= wr_gray_next;
    end
  end

  // ---------------- read clock domain ----------------
  logic [PW-1:0]    rd_bin  = '0;
  logic [PW-1:0]    rd_gray = '0;
  logic [WIDTH-1:0] rd_data = '0;
  logic [PW-1:0]    rd_gray_next, wr_gray_in_rd, wr_bin_in_rd;
  logic             do_read;

  assign empty   = (rd_bin == wr_bin_in_rd);
  assign do_read = rd_en && !empty;
  assign dout    = rd_data;

  bin2gray #(.WIDTH(PW)) u_rd_b2g (.bin(rd_bin + 1'b1), .gray(rd_gray_next));

  always_ff @(posedge rd_clk) begin
    if (do_read) begin
      rd_data <= mem[rd_bin[AW-1:0]];
      rd_bin  <= rd_bin + 1'b1;
      rd_gray <= rd_gray_next;
    end
  end

  // ---------------- clock-domain crossings ----------------
  synchronizer #(.WIDTH(PW)) u_wr_to_rd (
    .async_signal(wr_gray), .clk(rd_clk), .sync_signal(wr_gray_in_rd)
  );
  gray2bin #(.WIDTH(PW)) u_rd_g2b (.gray(wr_gray_in_rd), .bin(wr_bin_in_rd));

  synchronizer #(.WIDTH(PW)) u_rd_to_wr (
    .async_signal(rd_gray), .clk(wr_clk), .sync_signal(rd_gray_in_wr)
  );
  gray2bin #(.WIDTH(PW)) u_wr_g2b (.gray(rd_gray_in_wr), .bin(rd_bin_in_wr));

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("async_fifo: DEPTH must be a power of two, at least 2");
endmodule
