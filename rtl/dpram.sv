// Dual-port RAM used as FIFO storage.
// One synchronous write port and one asynchronous read port, so a write and a
// read can happen in the same clock. Reading is combinational from rd_addr,
// which lets the FIFO around it present its oldest entry without a wait cycle.
// The original core took this RAM from an FPGA vendor's generator; here it is a
// plain array that synthesis maps to distributed or block RAM.
module dpram #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  assign rd_data = mem[rd_addr];
endmodule
