// Bit-addressable I/O ports of the ARINC controller.
// The IN_W-bit input port is registered once (pins may change at any time);
// the OUT_W-bit output port is a register in which one bit, chosen by bit_sel,
// is set or cleared per clock. Port widths (8 in, 16 out) follow the design;
// the input register and the zero reset value are this design's choices.
module arinc_ctrl_ports #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 16,
  localparam int unsigned SW = $clog2(OUT_W)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  in_pins,
  output logic [IN_W-1:0]  in_q,
  input  logic             bit_we,
  input  logic [SW-1:0]    bit_sel,
  input  logic             bit_val,
  output logic [OUT_W-1:0] out_q
);
  always_ff @(posedge clk) begin
    if (rst) begin
      in_q  <= '0;
      out_q <= '0;
    end else begin
      in_q <= in_pins;
      if (bit_we) out_q[bit_sel] <= bit_val;
    end
  end
endmodule
