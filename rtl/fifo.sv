// Synchronous FIFO: dual-port RAM plus pointer control circuitry.
// DEPTH must be a power of two.
// The write pointer and read pointer each carry one extra wrap bit; equal
// pointers mean empty, pointers that differ only in the wrap bit mean full.
// A write while full and a read while empty are ignored, so the FIFO never
// overwrites unread data. Reads are first-word-fall-through: rd_data always
// shows the oldest entry, and rd_en removes it at the clock edge. clr empties
// the FIFO in one clock. count gives the occupancy used by the frame interrupt.
// Structure (RAM + read/write pointers compared for full and empty) follows the
// design; the fall-through read and the clear input are this design's choices.
module fifo #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,      // synchronous, active high
  input  logic             clr,      // synchronous flush
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);
  logic [AW:0] wr_ptr, rd_ptr;
  logic        do_wr, do_rd;

  assign empty = (wr_ptr == rd_ptr);
  assign full  = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign count = wr_ptr - rd_ptr;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  dpram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_ram (
    .clk     (clk),
    .we      (do_wr),
    .wr_addr (wr_ptr[AW-1:0]),
    .wr_data (wr_data),
    .rd_addr (rd_ptr[AW-1:0]),
    .rd_data (rd_data)
  );

  // Occupancy can never exceed the depth.
  assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));
endmodule
