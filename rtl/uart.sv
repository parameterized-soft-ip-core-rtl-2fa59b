// UART with 16x8 transmit and receive FIFOs and a frame-size receive interrupt.
// The host writes bytes into the transmit FIFO; the control unit feeds them one
// by one to the transmit shifter. Received frames go through the error checker
// into the receive FIFO. The receive interrupt pulses when the receive FIFO
// holds the programmed number of bytes (default 8), so the host can read a
// whole packet without polling. The baud generator paces both shifters; the
// reset controller merges the external and the software reset.
// Host access is synchronous and takes one clock (see uart_regs). Serial timing
// is set by the baud register (see uart_baud_gen).
// The partition (register logic, FIFOs, control unit with baud generator, reset
// and interrupt controllers, shifters, data bus controller and error checker)
// follows the design.
module uart
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH    = 16,
  parameter int unsigned DEFAULT_FRAME = 8,
  parameter int unsigned BAUD_CNT_W    = 8,
  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH) + 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sel,
  input  logic       rd,
  input  logic       wr,
  input  logic [1:0] addr,
  input  logic [7:0] wdata,
  output logic [7:0] rdata,
  output logic       txd,
  input  logic       rxd,
  output logic       tx_irq_n,
  output logic       rx_irq_n,
  output logic [3:0] events     // one-clock markers: {tx irq, rx irq, rx frame, overrun}
);
  logic             rst;
  uart_cmd_t        cmd_q;
  logic             err_reset, tx_push, rx_pop;
  logic [7:0]       baud_q, tx_head, rx_head;
  logic [CNT_W-1:0] frame_q, tx_count, rx_count;
  logic             tx_empty, tx_full, rx_empty, rx_full;
  logic             fs_tick, tick16, tx_busy, tx_start;
  logic             rx_valid, rx_perr, rx_ferr, rx_busy;
  logic [7:0]       rx_byte;
  logic             perr_q, ferr_q, ovr_q, tx_fired, rx_fired;
  uart_status_t     status;

  uart_reset_ctrl u_rst (.clk(clk), .ext_rst_n(rst_n), .sw_reset(cmd_q.sw_reset), .rst(rst));

  uart_regs #(.CNT_W(CNT_W), .DEFAULT_FRAME(DEFAULT_FRAME)) u_regs (
    .clk(clk), .rst(rst), .sel(sel), .rd(rd), .wr(wr), .addr(addr), .wdata(wdata), .rdata(rdata),
    .tx_push(tx_push), .rx_pop(rx_pop), .rx_head(rx_head),
    .cmd_q(cmd_q), .err_reset(err_reset), .baud_q(baud_q), .frame_q(frame_q),
    .status(status), .errors({ovr_q, ferr_q, perr_q}));

  fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk(clk), .rst(rst), .clr(1'b0), .wr_en(tx_push), .wr_data(wdata),
    .rd_en(tx_start), .rd_data(tx_head), .empty(tx_empty), .full(tx_full), .count(tx_count));

  fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk(clk), .rst(rst), .clr(1'b0), .wr_en(rx_valid), .wr_data(rx_byte),
    .rd_en(rx_pop), .rd_data(rx_head), .empty(rx_empty), .full(rx_full), .count(rx_count));

  uart_baud_gen #(.CNT_W(BAUD_CNT_W)) u_baud (
    .clk(clk), .rst(rst), .baud_reg(baud_q), .first_stage_tick(fs_tick), .tick16(tick16));

  assign tx_start = !tx_empty && !tx_busy;

  uart_tx u_tx (
    .clk(clk), .rst(rst), .tick16(tick16), .par_en(cmd_q.par_en), .par_odd(cmd_q.par_odd),
    .start(tx_start), .data(tx_head), .busy(tx_busy), .txd(txd));

  uart_rx u_rx (
    .clk(clk), .rst(rst), .tick16(tick16), .par_en(cmd_q.par_en), .par_odd(cmd_q.par_odd),
    .rxd(rxd), .valid(rx_valid), .data(rx_byte), .par_err(rx_perr), .frm_err(rx_ferr), .busy(rx_busy));

  uart_err u_err (
    .clk(clk), .rst(rst), .frame_valid(rx_valid), .frame_par_err(rx_perr), .frame_frm_err(rx_ferr),
    .fifo_full(rx_full), .err_reset(err_reset),
    .parity_err(perr_q), .framing_err(ferr_q), .overrun_err(ovr_q));

  uart_irq #(.CNT_W(CNT_W)) u_irq (
    .clk(clk), .rst(rst), .tx_ie(cmd_q.tx_ie), .rx_ie(cmd_q.rx_ie), .tx_empty(tx_empty),
    .rx_count(rx_count), .frame_size(frame_q), .tx_irq_n(tx_irq_n), .rx_irq_n(rx_irq_n),
    .tx_fired(tx_fired), .rx_fired(rx_fired));

  assign status = '{unused: 2'b00, rx_ready: !rx_empty, tx_ready: tx_empty && !tx_busy,
                    rx_full: rx_full, rx_empty: rx_empty, tx_full: tx_full, tx_empty: tx_empty};
  assign events = {tx_fired, rx_fired, rx_valid, rx_valid && rx_full};
endmodule
