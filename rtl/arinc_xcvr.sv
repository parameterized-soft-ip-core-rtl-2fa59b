// ARINC-429 transceiver: control register, control unit, baud rate generator,
// one transmitter and two receivers.
// ctrl_load writes the 16-bit control word into the control register; the
// control unit decodes it into parity enable/sense, word length and transmit
// and receive speeds for the other blocks. load_lo/load_hi take the two halves
// of a word to send from din. Each receiver holds one received word until its
// ack. The block structure follows the design; the control word layout is this
// design's own (see arinc_pkg::xcvr_ctrl_t). Reset value: high speed, 32-bit
// words, parity off.
module arinc_xcvr
  import arinc_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 24_000_000,
  parameter int unsigned HI_BPS     = 100_000,
  parameter int unsigned LO_BPS     = 12_500,
  parameter int unsigned OVERSAMPLE = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] din,
  input  logic        ctrl_load,
  input  logic        load_lo,
  input  logic        load_hi,
  output logic        tx_ready,
  output logic        tx_busy,
  output logic        tx_a,
  output logic        tx_b,
  input  logic        rx1_a, rx1_b, rx2_a, rx2_b,
  input  logic        rx1_ack, rx2_ack,
  output logic        rx1_ready, rx2_ready,
  output logic [31:0] rx1_data, rx2_data,
  output logic        rx1_overrun, rx2_overrun,
  output logic        rx1_perr, rx2_perr,   // parity error of the held word
  output logic        tx_word_sent,         // one clock at the end of each sent word
  output xcvr_ctrl_t  ctrl_q
);
  logic tx_tick, rx_tick;

  // control register
  always_ff @(posedge clk) begin
    if (rst)            ctrl_q <= '0;
    else if (ctrl_load) ctrl_q <= din;
  end

  arinc_baud_gen #(.CLK_HZ(CLK_HZ), .HI_BPS(HI_BPS), .LO_BPS(LO_BPS), .OVERSAMPLE(OVERSAMPLE)) u_baud (
    .clk(clk), .rst(rst), .tx_lo(ctrl_q.tx_lo), .rx_lo(ctrl_q.rx_lo),
    .tx_tick(tx_tick), .rx_tick(rx_tick));

  arinc_tx #(.OVERSAMPLE(OVERSAMPLE)) u_tx (
    .clk(clk), .rst(rst), .tick(tx_tick), .w25(ctrl_q.w25), .par_en(ctrl_q.par_en),
    .par_even(ctrl_q.par_even), .din(din), .load_lo(load_lo), .load_hi(load_hi),
    .ready(tx_ready), .busy(tx_busy), .line_a(tx_a), .line_b(tx_b), .word_sent(tx_word_sent));

  arinc_rx #(.OVERSAMPLE(OVERSAMPLE)) u_rx1 (
    .clk(clk), .rst(rst), .tick(rx_tick), .w25(ctrl_q.w25), .par_en(ctrl_q.par_en),
    .par_even(ctrl_q.par_even), .line_a(rx1_a), .line_b(rx1_b), .ack(rx1_ack),
    .ready(rx1_ready), .data(rx1_data), .par_err(rx1_perr), .overrun(rx1_overrun));

  arinc_rx #(.OVERSAMPLE(OVERSAMPLE)) u_rx2 (
    .clk(clk), .rst(rst), .tick(rx_tick), .w25(ctrl_q.w25), .par_en(ctrl_q.par_en),
    .par_even(ctrl_q.par_even), .line_a(rx2_a), .line_b(rx2_b), .ack(rx2_ack),
    .ready(rx2_ready), .data(rx2_data), .par_err(rx2_perr), .overrun(rx2_overrun));
endmodule
