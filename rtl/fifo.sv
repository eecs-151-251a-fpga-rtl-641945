// Synchronous FIFO: one clock for both the write and the read side.
//
// The storage is a circular buffer of DEPTH words addressed by a write pointer
// and a read pointer. Both pointers carry one bit more than the address: the
// FIFO is empty when the two pointers are equal and full when their addresses
// are equal but the extra (wrap) bits differ. A write (wr_en high, not full)
// stores din at the write pointer and advances it; a read (rd_en high, not
// empty) advances the read pointer and registers the word it pointed at onto
// dout, so dout carries the word after the rising edge on which rd_en was
// high and keeps it until the next read. Writes when full and reads when
// empty are ignored, so neither data nor flags are corrupted. A read and a
// write may happen on the same edge. rst is synchronous and returns both
// pointers to zero.
//
// Pointers, flags, registered read data and the behaviour on overflow and
// underflow follow the lab's FIFO description; the wrap-bit flag scheme is
// this design's choice, and it needs DEPTH to be a power of two.
module fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst,

  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,

  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_write, do_read;

  assign empty    = (wr_ptr == rd_ptr);
  assign full     = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign do_write = wr_en && !full;
  assign do_read  = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_ptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      dout   <= '0;
    end else begin
      if (do_write) wr_ptr <= wr_ptr + 1'b1;
      if (do_read) begin
        rd_ptr <= rd_ptr + 1'b1;
        dout   <= mem[rd_ptr[AW-1:0]];
      end
    end
  end

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("fifo: DEPTH must be a power of two, at least 2");

  // The two flags can never be raised together.
  assert property (@(posedge clk) disable iff (rst) !(full && empty));
endmodule
