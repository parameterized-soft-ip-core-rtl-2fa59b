// Shared types and constants of the ARINC-429 module.
// FIFO entries are 18 bits: a 16-bit half of an ARINC word plus two flag bits
// that say what the half is. On the transmit side the flags mark the control
// word, part one (bits 15:0) or part two (bits 31:16) of a word; on the receive
// side they name the receiver and the part. The transceiver control word fields
// are this design's own layout.
package arinc_pkg;
  typedef enum logic [1:0] {
    TAG_CTRL  = 2'b00,   // transceiver control word
    TAG_PART1 = 2'b01,   // ARINC word bits 15:0
    TAG_PART2 = 2'b10    // ARINC word bits 31:16, completes the word
  } tx_tag_e;

  typedef struct packed {
    logic [1:0]  tag;
    logic [15:0] data;
  } tx_entry_t;

  typedef struct packed {
    logic        rx2;    // 0 receiver 1, 1 receiver 2
    logic        part2;  // 0 bits 15:0, 1 bits 31:16
    logic [15:0] data;
  } rx_entry_t;

  // Transceiver control word (low bits of the 16-bit control entry).
  typedef struct packed {
    logic [10:0] unused;
    logic        rx_lo;    // receivers at low speed (12.5 kbps)
    logic        tx_lo;    // transmitter at low speed
    logic        w25;      // 25-bit words instead of 32
    logic        par_even; // even parity instead of the ARINC odd parity
    logic        par_en;   // generate / check parity in the last bit
  } xcvr_ctrl_t;

  // Host register addresses inside the module.
  localparam logic [1:0] A_DATA   = 2'd0;  // W control word, R receive data
  localparam logic [1:0] A_PART1  = 2'd1;  // W part one,      R status
  localparam logic [1:0] A_PART2  = 2'd2;  // W part two
  localparam logic [1:0] A_FRAME  = 2'd3;  // R/W frame size in ARINC words
endpackage
