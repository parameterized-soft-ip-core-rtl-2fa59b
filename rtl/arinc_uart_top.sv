// ARINC-429 and UART interface core.
// A host processor reaches two serial interfaces through one parallel bus: an
// ARINC-429 module (one transmitter, two receivers, FIFOs, a small controller)
// and a UART with FIFOs. Both raise frame-size interrupts so the host reads a
// whole frame at once instead of polling. Host accesses take one clock.
// Address map: 0-3 ARINC module, 8-11 UART (see arinc_module and uart_regs).
// The bidirectional data bus is brought out as bus_wdata / bus_rdata with
// bus_rdata_oe for the pad driver. Serial lines go to external line drivers and
// receivers. rst_n is the external reset; the ARINC side uses it synchronised,
// the UART through its reset controller. The top-level partition follows the
// design; the address split and the split data bus are this design's own.
module arinc_uart_top #(
  parameter int unsigned CLK_HZ = 24_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_cs,
  input  logic        bus_rd,
  input  logic        bus_wr,
  input  logic [3:0]  bus_addr,
  input  logic [15:0] bus_wdata,
  output logic [15:0] bus_rdata,
  output logic        bus_rdata_oe,
  output logic        a429_tx_a,
  output logic        a429_tx_b,
  input  logic        a429_rx1_a,
  input  logic        a429_rx1_b,
  input  logic        a429_rx2_a,
  input  logic        a429_rx2_b,
  output logic        arinc_irq_n,
  output logic        uart_txd,
  input  logic        uart_rxd,
  output logic        uart_tx_irq_n,
  output logic        uart_rx_irq_n
);
  logic        arinc_sel, uart_sel, arinc_fired;
  logic [15:0] arinc_rdata;
  logic [7:0]  uart_rdata;
  logic [3:0]  uart_events;
  logic [1:0]  rst_sync;
  logic        rst;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rst_sync <= 2'b11;
    else        rst_sync <= {rst_sync[0], 1'b0};
  end
  assign rst = rst_sync[1];

  bus_mux #(.ADDR_W(4), .DATA_W(16)) u_bus (
    .cs(bus_cs), .rd(bus_rd), .addr(bus_addr), .arinc_sel(arinc_sel), .uart_sel(uart_sel),
    .arinc_rdata(arinc_rdata), .uart_rdata(uart_rdata), .rdata(bus_rdata), .rdata_oe(bus_rdata_oe));

  arinc_module #(.CLK_HZ(CLK_HZ)) u_arinc (
    .clk(clk), .rst(rst), .sel(arinc_sel), .rd(bus_rd), .wr(bus_wr), .addr(bus_addr[1:0]),
    .wdata(bus_wdata), .rdata(arinc_rdata), .tx_a(a429_tx_a), .tx_b(a429_tx_b),
    .rx1_a(a429_rx1_a), .rx1_b(a429_rx1_b), .rx2_a(a429_rx2_a), .rx2_b(a429_rx2_b),
    .irq_n(arinc_irq_n), .frame_fired(arinc_fired));

  uart u_uart (
    .clk(clk), .rst_n(rst_n), .sel(uart_sel), .rd(bus_rd), .wr(bus_wr), .addr(bus_addr[1:0]),
    .wdata(bus_wdata[7:0]), .rdata(uart_rdata), .txd(uart_txd), .rxd(uart_rxd),
    .tx_irq_n(uart_tx_irq_n), .rx_irq_n(uart_rx_irq_n), .events(uart_events));
endmodule
