// ARINC-429 baud rate generator.
// Two independent counters divide the system clock down to OVERSAMPLE times the
// transmit and the receive bit rate. Each rate is chosen by one control bit:
// high speed HI_BPS (100 kbps) or low speed LO_BPS (12.5 kbps). The outputs are
// one-clock enable ticks that pace the transmitter and receivers. At 24 MHz the
// divisors are 24 (high) and 192 (low). Dividing the input clock and the ten
// times oversampling follow the design; using enables instead of derived clocks
// is this design's choice.
module arinc_baud_gen #(
  parameter int unsigned CLK_HZ     = 24_000_000,
  parameter int unsigned HI_BPS     = 100_000,
  parameter int unsigned LO_BPS     = 12_500,
  parameter int unsigned OVERSAMPLE = 10,
  localparam int unsigned DIV_HI = CLK_HZ / (HI_BPS * OVERSAMPLE),
  localparam int unsigned DIV_LO = CLK_HZ / (LO_BPS * OVERSAMPLE),
  localparam int unsigned CW     = $clog2(DIV_LO + 1)
) (
  input  logic clk,
  input  logic rst,
  input  logic tx_lo,
  input  logic rx_lo,
  output logic tx_tick,
  output logic rx_tick
);
  logic [CW-1:0] tx_cnt, rx_cnt, tx_div, rx_div;

  assign tx_div  = tx_lo ? CW'(DIV_LO - 1) : CW'(DIV_HI - 1);
  assign rx_div  = rx_lo ? CW'(DIV_LO - 1) : CW'(DIV_HI - 1);
  assign tx_tick = (tx_cnt == 0);
  assign rx_tick = (rx_cnt == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_cnt <= '0;
      rx_cnt <= '0;
    end else begin
      tx_cnt <= (tx_cnt == 0 || tx_cnt > tx_div) ? tx_div : tx_cnt - 1'b1;
      rx_cnt <= (rx_cnt == 0 || rx_cnt > rx_div) ? rx_div : rx_cnt - 1'b1;
    end
  end
endmodule
