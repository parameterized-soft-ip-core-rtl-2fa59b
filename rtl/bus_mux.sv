// Host bus multiplexing.
// Splits the host address space between the ARINC module (addr[3] = 0) and the
// UART (addr[3] = 1), returns the selected block's read data and drives the
// output enable of the bidirectional data bus pad while a read to the chip is
// in progress. UART data is zero-extended to the bus width. The block follows
// the design's top-level diagram; the address split is this design's own.
module bus_mux #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 16
) (
  input  logic              cs,
  input  logic              rd,
  input  logic [ADDR_W-1:0] addr,
  output logic              arinc_sel,
  output logic              uart_sel,
  input  logic [DATA_W-1:0] arinc_rdata,
  input  logic [7:0]        uart_rdata,
  output logic [DATA_W-1:0] rdata,
  output logic              rdata_oe
);
  assign arinc_sel = cs && !addr[ADDR_W-1];
  assign uart_sel  = cs &&  addr[ADDR_W-1];
  assign rdata     = uart_sel ? DATA_W'(uart_rdata) : arinc_sel ? arinc_rdata : '0;
  assign rdata_oe  = cs && rd;
endmodule
