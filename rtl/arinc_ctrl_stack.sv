// Stack RAM of the ARINC controller.
// DEPTH words of WIDTH bits hold return addresses pushed by Jsr and popped by
// Ret. The stack pointer itself is kept in the controller's register file; this
// block is the storage: synchronous write, combinational read. 32 entries of
// 7 bits (the program counter width) follow the design.
module arinc_ctrl_stack #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 7,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
