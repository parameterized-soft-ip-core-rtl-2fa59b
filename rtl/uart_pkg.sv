// Shared constants and types of the UART.
// Register addresses, command register layout and status bit layout are this
// design's own; the set of registers (command, baud, frame size, status, FIFO
// data) follows the design.
package uart_pkg;
  localparam logic [1:0] U_DATA  = 2'd0;  // W transmit FIFO, R receive FIFO
  localparam logic [1:0] U_CMD   = 2'd1;  // W command,       R status
  localparam logic [1:0] U_BAUD  = 2'd2;  // W baud register, R error flags
  localparam logic [1:0] U_FRAME = 2'd3;  // R/W frame size (receive interrupt level)

  typedef struct packed {
    logic [1:0] unused;
    logic       sw_reset;   // resets the UART, clears itself
    logic       err_reset;  // clears the error flags, not stored
    logic       par_odd;    // odd parity instead of even
    logic       par_en;     // 11-bit frames with a parity bit
    logic       rx_ie;      // receive (frame) interrupt enable
    logic       tx_ie;      // transmit interrupt enable
  } uart_cmd_t;

  typedef struct packed {
    logic [1:0] unused;
    logic       rx_ready;   // receive FIFO holds data
    logic       tx_ready;   // transmit FIFO empty and shifter idle
    logic       rx_full;
    logic       rx_empty;
    logic       tx_full;
    logic       tx_empty;
  } uart_status_t;
endpackage
