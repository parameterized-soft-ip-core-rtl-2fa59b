// UART interrupt controller.
// Two active-low interrupts, each enabled on its own and each a three-clock
// pulse. The receive interrupt compares the receive FIFO occupancy (write
// pointer minus read pointer) with the frame size register and fires when they
// become equal. The transmit interrupt fires when the transmit FIFO becomes
// empty. Both use the frame compare block. The receive rule, the enables and the
// pulse length follow the design; the transmit trigger is this design's choice.
module uart_irq #(
  parameter int unsigned CNT_W = 5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             tx_ie,
  input  logic             rx_ie,
  input  logic             tx_empty,
  input  logic [CNT_W-1:0] rx_count,
  input  logic [CNT_W-1:0] frame_size,
  output logic             tx_irq_n,
  output logic             rx_irq_n,
  output logic             tx_fired,
  output logic             rx_fired
);
  frame_irq #(.CNT_W(CNT_W), .PULSE_CLKS(3)) u_rx (
    .clk(clk), .rst(rst), .en(rx_ie), .count(rx_count), .threshold(frame_size),
    .irq_n(rx_irq_n), .fired(rx_fired));

  frame_irq #(.CNT_W(1), .PULSE_CLKS(3)) u_tx (
    .clk(clk), .rst(rst), .en(tx_ie), .count(tx_empty), .threshold(1'b1),
    .irq_n(tx_irq_n), .fired(tx_fired));
endmodule
