// Firmware of the ARINC controller and the meaning of its port bits.
// The controller never touches data: it watches flags on its input port and
// pulses strobes on its output port (SETB then CLRB gives a one-clock pulse).
// Main loop:
//   1. If the transmit FIFO holds an entry, look at its tag. A control word is
//      loaded into the transceiver control register, part one into the
//      transmitter's low half; part two is loaded only when the transmitter's
//      data register is free, which starts the word. The entry is then popped.
//   2. If the receive FIFO has room for two entries and receiver 1 holds a
//      word, store its two halves (part one, part two) and acknowledge it.
//      The same for receiver 2.
// The program is this design's own; the design does not print its firmware.
package arinc_fw_pkg;
  import arinc_ctrl_pkg::*;

  // Input port bits (bit numbers 16 + index)
  localparam int IN_TXE    = 0;  // transmit FIFO empty
  localparam int IN_TAG0   = 1;  // tag of the transmit FIFO head, bit 0
  localparam int IN_TAG1   = 2;  // tag bit 1
  localparam int IN_TXRDY  = 3;  // transmitter data register free
  localparam int IN_RX1RDY = 4;  // receiver 1 holds a word
  localparam int IN_RX2RDY = 5;  // receiver 2 holds a word
  localparam int IN_RXNRM  = 6;  // receive FIFO has fewer than two free entries

  // Output port bits
  localparam int OUT_TXRD  = 0;  // pop the transmit FIFO
  localparam int OUT_CTLLD = 1;  // load transceiver control register
  localparam int OUT_LDLO  = 2;  // load transmitter low half
  localparam int OUT_LDHI  = 3;  // load transmitter high half, start the word
  localparam int OUT_RXWR  = 4;  // push into the receive FIFO
  localparam int OUT_RXSEL = 5;  // 0 receiver 1, 1 receiver 2
  localparam int OUT_HALF  = 6;  // 0 bits 15:0, 1 bits 31:16
  localparam int OUT_ACK1  = 7;  // release receiver 1
  localparam int OUT_ACK2  = 8;  // release receiver 2

  localparam int L_MAIN = 'h00, L_TXLO = 'h0C, L_TXHI = 'h12, L_CHKRX = 'h18,
                 L_CHKRX2 = 'h21, L_POPTX = 'h2C, L_STORE = 'h2F;

  function automatic logic [1023:0] image();
    logic [1023:0] m = '0;   // unused bytes are NOP
    // MAIN
    m = put(m, 'h00, i2(OP_JB,  BIT_IN0 + IN_TXE,  L_CHKRX));
    m = put(m, 'h02, i2(OP_JB,  BIT_IN0 + IN_TAG1, L_TXHI));
    m = put(m, 'h04, i2(OP_JB,  BIT_IN0 + IN_TAG0, L_TXLO));
    m = put(m, 'h06, i1(OP_SETB, OUT_CTLLD));
    m = put(m, 'h07, i1(OP_CLRB, OUT_CTLLD));
    m = put(m, 'h08, i2(OP_JSR, 0, L_POPTX));
    m = put(m, 'h0A, i2(OP_JMP, 0, L_CHKRX));
    // TXLO
    m = put(m, 'h0C, i1(OP_SETB, OUT_LDLO));
    m = put(m, 'h0D, i1(OP_CLRB, OUT_LDLO));
    m = put(m, 'h0E, i2(OP_JSR, 0, L_POPTX));
    m = put(m, 'h10, i2(OP_JMP, 0, L_CHKRX));
    // TXHI
    m = put(m, 'h12, i2(OP_JNB, BIT_IN0 + IN_TXRDY, L_CHKRX));
    m = put(m, 'h14, i1(OP_SETB, OUT_LDHI));
    m = put(m, 'h15, i1(OP_CLRB, OUT_LDHI));
    m = put(m, 'h16, i2(OP_JSR, 0, L_POPTX));
    // CHKRX
    m = put(m, 'h18, i2(OP_JB,  BIT_IN0 + IN_RXNRM,  L_MAIN));
    m = put(m, 'h1A, i2(OP_JNB, BIT_IN0 + IN_RX1RDY, L_CHKRX2));
    m = put(m, 'h1C, i1(OP_CLRB, OUT_RXSEL));
    m = put(m, 'h1D, i2(OP_JSR, 0, L_STORE));
    m = put(m, 'h1F, i1(OP_SETB, OUT_ACK1));
    m = put(m, 'h20, i1(OP_CLRB, OUT_ACK1));
    // CHKRX2
    m = put(m, 'h21, i2(OP_JB,  BIT_IN0 + IN_RXNRM,  L_MAIN));
    m = put(m, 'h23, i2(OP_JNB, BIT_IN0 + IN_RX2RDY, L_MAIN));
    m = put(m, 'h25, i1(OP_SETB, OUT_RXSEL));
    m = put(m, 'h26, i2(OP_JSR, 0, L_STORE));
    m = put(m, 'h28, i1(OP_SETB, OUT_ACK2));
    m = put(m, 'h29, i1(OP_CLRB, OUT_ACK2));
    m = put(m, 'h2A, i2(OP_JMP, 0, L_MAIN));
    // POPTX
    m = put(m, 'h2C, i1(OP_SETB, OUT_TXRD));
    m = put(m, 'h2D, i1(OP_CLRB, OUT_TXRD));
    m = put(m, 'h2E, i1(OP_RET));
    // STORE: both halves of the selected receiver
    m = put(m, 'h2F, i1(OP_CLRB, OUT_HALF));
    m = put(m, 'h30, i1(OP_SETB, OUT_RXWR));
    m = put(m, 'h31, i1(OP_CLRB, OUT_RXWR));
    m = put(m, 'h32, i1(OP_SETB, OUT_HALF));
    m = put(m, 'h33, i1(OP_SETB, OUT_RXWR));
    m = put(m, 'h34, i1(OP_CLRB, OUT_RXWR));
    m = put(m, 'h35, i1(OP_RET));
    // 0x36..0x7F: NOPs; the program counter wraps to MAIN.
    return m;
  endfunction

  localparam logic [1023:0] FW_IMAGE = image();
endpackage
