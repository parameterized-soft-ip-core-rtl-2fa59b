// UART address decoding, register logic and data bus controller.
// Decodes host accesses into the command, baud and frame size registers and the
// two FIFOs, and selects what the UART drives on the data bus. Every register is
// written in the clock wr is high and read combinationally in the clock rd is
// high, so one access takes one clock. Writing the data address pushes the
// transmit FIFO; reading it pops the receive FIFO at the end of the clock. The
// error reset bit of a command write is not stored: it gives a one-clock pulse.
// The frame size register resets to DEFAULT_FRAME (8) and limits the receive
// interrupt. The registers and their roles follow the design; addresses and bit
// layouts (uart_pkg) are this design's own.
module uart_regs
  import uart_pkg::*;
#(
  parameter int unsigned CNT_W         = 5,
  parameter int unsigned DEFAULT_FRAME = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sel,
  input  logic             rd,
  input  logic             wr,
  input  logic [1:0]       addr,
  input  logic [7:0]       wdata,
  output logic [7:0]       rdata,
  // to the FIFOs
  output logic             tx_push,
  output logic             rx_pop,
  input  logic [7:0]       rx_head,
  // registers
  output uart_cmd_t        cmd_q,
  output logic             err_reset,
  output logic [7:0]       baud_q,
  output logic [CNT_W-1:0] frame_q,
  // status sources
  input  uart_status_t     status,
  input  logic [2:0]       errors      // {overrun, framing, parity}
);
  logic wr_sel, rd_sel;

  assign wr_sel    = sel && wr;
  assign rd_sel    = sel && rd;
  assign tx_push   = wr_sel && addr == U_DATA;
  assign rx_pop    = rd_sel && addr == U_DATA;
  assign err_reset = wr_sel && addr == U_CMD && wdata[4];

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_q   <= '0;
      baud_q  <= 8'h01;
      frame_q <= CNT_W'(DEFAULT_FRAME);
    end else if (wr_sel) begin
      unique case (addr)
        U_CMD:   begin cmd_q <= wdata; cmd_q.err_reset <= 1'b0; end
        U_BAUD:  baud_q  <= wdata;
        U_FRAME: frame_q <= wdata[CNT_W-1:0];
        default: ;
      endcase
    end
  end

  // data bus controller
  always_comb begin
    unique case (addr)
      U_DATA:  rdata = rx_head;
      U_CMD:   rdata = status;
      U_BAUD:  rdata = {5'b0, errors};
      U_FRAME: rdata = 8'(frame_q);
      default: rdata = '0;
    endcase
  end
endmodule
