// ARINC-429 module: host registers, transmit FIFO (16x18), receive FIFO
// (64x18), controller and transceiver with one transmitter and two receivers.
// The host writes a control word or the two 16-bit halves of an ARINC word; each
// write lands in the transmit FIFO together with a 2-bit tag. The controller
// firmware drains the FIFO into the transceiver and moves received words, as two
// tagged halves, into the shared receive FIFO. Reading the status register shows
// the tag of the receive FIFO's oldest entry, so the host knows which receiver
// and which half it is about to read. When the receive FIFO holds the number of
// words set in the frame size register (default one word, i.e. two entries) the
// active-low interrupt pulses for three clocks.
// Host access is synchronous: a read returns data in the clock rd is high and
// pops the receive FIFO at its end; a write takes effect at the end of its clock.
// Register map (this design's own): write 0 control word, 1 part one (bits
// 15:0), 2 part two (bits 31:16); read 0 receive data, 1 status; 3 frame size.
// Status: [0] tx full [1] tx empty [2] rx full [3] rx empty [4] head is part two
// [5] head is from receiver 2 [6] transmitter busy [13:7] receive FIFO entries.
// FIFO sizes, the tagging of halves, the status register and the frame
// interrupt follow the design.
module arinc_module
  import arinc_pkg::*;
  import arinc_fw_pkg::*;
#(
  parameter int unsigned CLK_HZ        = 24_000_000,
  parameter int unsigned HI_BPS        = 100_000,
  parameter int unsigned LO_BPS        = 12_500,
  parameter int unsigned TX_DEPTH      = 16,
  parameter int unsigned RX_DEPTH      = 64,
  parameter int unsigned DEFAULT_FRAME = 1,
  localparam int unsigned RXC_W = $clog2(RX_DEPTH) + 1,
  localparam int unsigned TXC_W = $clog2(TX_DEPTH) + 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,
  input  logic        rd,
  input  logic        wr,
  input  logic [1:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        tx_a,
  output logic        tx_b,
  input  logic        rx1_a, rx1_b, rx2_a, rx2_b,
  output logic        irq_n,
  output logic        frame_fired    // one clock per interrupt, for observation
);
  tx_entry_t        tx_head;
  rx_entry_t        rx_head, rx_in;
  logic             tx_empty, tx_full, rx_empty, rx_full;
  logic [TXC_W-1:0] tx_count;
  logic [RXC_W-1:0] rx_count;
  logic [RXC_W-2:0] frame_q;
  logic             host_wr_tx, host_rd_rx;
  logic [7:0]       in_port;
  logic [15:0]      out_port;
  logic             tx_ready, tx_busy;
  logic             rx1_ready, rx2_ready, rx1_ovr, rx2_ovr, rx1_perr, rx2_perr, tx_word_sent;
  logic [31:0]      rx1_data, rx2_data, rx_word;
  xcvr_ctrl_t       ctrl_q;
  logic [6:0]       pc_unused;
  logic             idone_unused;

  assign host_wr_tx = sel && wr && (addr != A_FRAME);
  assign host_rd_rx = sel && rd && (addr == A_DATA);

  fifo #(.WIDTH(18), .DEPTH(TX_DEPTH)) u_txf (
    .clk(clk), .rst(rst), .clr(1'b0),
    .wr_en(host_wr_tx), .wr_data({addr, wdata}),
    .rd_en(out_port[OUT_TXRD]), .rd_data(tx_head),
    .empty(tx_empty), .full(tx_full), .count(tx_count));

  assign rx_word = out_port[OUT_RXSEL] ? rx2_data : rx1_data;
  assign rx_in   = '{rx2: out_port[OUT_RXSEL], part2: out_port[OUT_HALF],
                     data: out_port[OUT_HALF] ? rx_word[31:16] : rx_word[15:0]};

  fifo #(.WIDTH(18), .DEPTH(RX_DEPTH)) u_rxf (
    .clk(clk), .rst(rst), .clr(1'b0),
    .wr_en(out_port[OUT_RXWR]), .wr_data(rx_in),
    .rd_en(host_rd_rx), .rd_data(rx_head),
    .empty(rx_empty), .full(rx_full), .count(rx_count));

  always_comb begin
    in_port = '0;
    in_port[IN_TXE]    = tx_empty;
    in_port[IN_TAG0]   = tx_head.tag[0];
    in_port[IN_TAG1]   = tx_head.tag[1];
    in_port[IN_TXRDY]  = tx_ready;
    in_port[IN_RX1RDY] = rx1_ready;
    in_port[IN_RX2RDY] = rx2_ready;
    in_port[IN_RXNRM]  = (RXC_W'(RX_DEPTH) - rx_count) < RXC_W'(2);
  end

  arinc_ctrl u_ctrl (
    .clk(clk), .rst(rst), .in_port(in_port), .out_port(out_port),
    .pc_o(pc_unused), .instr_done(idone_unused));

  arinc_xcvr #(.CLK_HZ(CLK_HZ), .HI_BPS(HI_BPS), .LO_BPS(LO_BPS)) u_xcvr (
    .clk(clk), .rst(rst), .din(tx_head.data),
    .ctrl_load(out_port[OUT_CTLLD]), .load_lo(out_port[OUT_LDLO]), .load_hi(out_port[OUT_LDHI]),
    .tx_ready(tx_ready), .tx_busy(tx_busy), .tx_a(tx_a), .tx_b(tx_b),
    .rx1_a(rx1_a), .rx1_b(rx1_b), .rx2_a(rx2_a), .rx2_b(rx2_b),
    .rx1_ack(out_port[OUT_ACK1]), .rx2_ack(out_port[OUT_ACK2]),
    .rx1_ready(rx1_ready), .rx2_ready(rx2_ready), .rx1_data(rx1_data), .rx2_data(rx2_data),
    .rx1_overrun(rx1_ovr), .rx2_overrun(rx2_ovr), .rx1_perr(rx1_perr), .rx2_perr(rx2_perr),
    .tx_word_sent(tx_word_sent), .ctrl_q(ctrl_q));

  // frame size register, in ARINC words
  always_ff @(posedge clk) begin
    if (rst)                              frame_q <= (RXC_W-1)'(DEFAULT_FRAME);
    else if (sel && wr && addr == A_FRAME) frame_q <= wdata[RXC_W-2:0];
  end

  frame_irq #(.CNT_W(RXC_W), .PULSE_CLKS(3)) u_irq (
    .clk(clk), .rst(rst), .en(1'b1), .count(rx_count), .threshold({frame_q, 1'b0}),
    .irq_n(irq_n), .fired(frame_fired));

  // read multiplexer
  always_comb begin
    rdata = '0;
    unique case (addr)
      A_DATA:  rdata = rx_head.data;
      A_PART1: rdata = 16'({rx_count, tx_busy, rx_head.rx2, rx_head.part2, rx_empty, rx_full, tx_empty, tx_full});
      A_FRAME: rdata = 16'(frame_q);
      default: rdata = '0;
    endcase
  end
endmodule
