# ARINC-429 and UART interface core

This core links a host processor to two serial links through one parallel bus.
One link is an ARINC-429 avionics interface with one transmitter and two
receivers. The other is a UART. The design has two goals:

* **Short bus cycles.** Every host read or write completes in one clock, which is
  41.7 ns at 24 MHz. The host never has to insert wait states.
* **Frame-size interrupts.** Each side has a frame size register. Its interrupt
  fires only once a whole frame has arrived in the receive FIFO, so the host
  does not poll word by word.

Everything is synthesizable SystemVerilog with parameters. The one exception is
the analog line interface (ARINC line drivers and receivers, optical isolation,
RS-232 level shifters), which stays outside the core.

```
            +------------------------------------------------------------+
 host bus   |  bus_mux  --+--> arinc_module ----------------------------+--> a429_tx_a/b
 (addr,     |             |      tx fifo 16x18 --+                      |<-- a429_rx1_a/b
  data,     |             |      rx fifo 64x18 <-+-- arinc_ctrl         |<-- a429_rx2_a/b
  rd/wr/cs) |             |                      |   (1-bit RISC, ROM)  |
            |             |                      +-- arinc_xcvr         |--> arinc_irq_n
            |             |                          (baud, tx, rx1, rx2)
            |             +--> uart ------------------------------------+--> uart_txd
            |                    uart_regs, tx/rx fifo 16x8,            |<-- uart_rxd
            |                    baud gen, shifters, error checker,     |--> uart_tx_irq_n
            |                    reset and interrupt controllers        |--> uart_rx_irq_n
            +------------------------------------------------------------+
```

## Host interface

The bus is synchronous to `clk`. A chip select `bus_cs` is qualified by one-clock
`bus_rd` or `bus_wr` strobes.

* **Reads** are combinational. `bus_rdata` is valid within the same clock, and a
  read of a FIFO data register pops the FIFO at the end of that clock.
* **Writes** take effect at the clock edge.

The bidirectional data bus appears as separate `bus_wdata` and `bus_rdata`
ports. `bus_rdata_oe` (`cs && rd`) enables the external tristate pad. Address
bit 3 selects the block:

| addr | write                                   | read                         |
|------|-----------------------------------------|------------------------------|
| 0    | ARINC transceiver control word          | ARINC receive FIFO data (pops) |
| 1    | ARINC word, part one (bits 15:0)        | ARINC status                 |
| 2    | ARINC word, part two (bits 31:16)       | 0                            |
| 3    | ARINC frame size (words, 1..32)         | ARINC frame size             |
| 8    | UART transmit byte                      | UART received byte (pops)    |
| 9    | UART command                            | UART status                  |
| 10   | UART baud register (B8..B1)             | UART error flags {overrun, framing, parity} |
| 11   | UART frame size (bytes, 1..16)          | UART frame size              |

The ARINC status register has these fields:

| bits  | field |
|-------|-------|
| [0]   | tx FIFO full |
| [1]   | tx FIFO empty |
| [2]   | rx FIFO full |
| [3]   | rx FIFO empty |
| [4]   | tag of the rx FIFO head: part two |
| [5]   | tag of the rx FIFO head: from receiver 2 |
| [6]   | transmitter busy |
| [13:7]| rx FIFO entries |

The UART command register:

| bit | function |
|-----|----------|
| 0 | tx interrupt enable |
| 1 | rx interrupt enable |
| 2 | parity enable |
| 3 | odd parity |
| 4 | error reset (one-shot, not stored) |
| 5 | software reset (clears itself) |

The UART status register:

| bit | flag |
|-----|------|
| 0 | tx FIFO empty |
| 1 | tx FIFO full |
| 2 | rx FIFO empty |
| 3 | rx FIFO full |
| 4 | transmitter ready (FIFO empty and shifter idle) |
| 5 | receiver ready (data waiting) |

All register addresses and bit layouts are this implementation's own.

## The ARINC module: words in halves, moved by a tiny controller

An ARINC word is 32 bits, or 25 bits in a short-word mode. The host bus and the
FIFOs are 16 bits wide, so every word travels as two halves. Each FIFO entry is
18 bits: 16 data bits plus a 2-bit tag.

* **Transmit tags** (`arinc_pkg::tx_tag_e`) mark an entry as a control word,
  part one or part two. The tag is the host's write address.
* **Receive tags** give the receiver number and the part. Both receivers share
  one 64-entry receive FIFO. Before reading the data register, the host reads
  the status register to see the head entry's tag.

### Controller (`arinc_ctrl`)

The controller never touches data. It is a one-bit machine and runs firmware
from a 128-byte ROM. Its 8-bit input port reads flags:

* tx FIFO empty
* the head entry's tag
* transmitter free
* receiver 1 ready and receiver 2 ready
* "rx FIFO has fewer than two free entries"

Its 16-bit output port drives strobes, chosen by bit number:

* pop the tx FIFO
* load the control register
* load the low half or the high half
* push to the rx FIFO
* select the receiver or the half
* acknowledge a receiver

A `Set b` followed by `Clr b` gives a strobe exactly one clock wide. The data
path (FIFO head → transceiver, receiver data register → FIFO) is plain wiring
and multiplexers steered by those bits.

The instruction set has ten instructions:

| opcode | instruction | what it does |
|--------|-------------|--------------|
| 0 | `Nop` | nothing |
| 1 | `Clr Cry` | clear the carry flag |
| 2 | `Set Cry` | set the carry flag |
| 3 | `Ret` | return from subroutine |
| 4 | `Clr b` | clear an output bit |
| 5 | `Set b` | set an output bit |
| 6 | `Jmp a` | jump |
| 7 | `Jsr a` | call a subroutine |
| 8 | `Jnb bit,a` | jump if bit clear |
| 9 | `Jb bit,a` | jump if bit set |

Encoding:

* Byte 0 is `{opcode[3:0], bit[3:0]}`.
* Jumps add byte 1, `{bit[4], target[6:0]}`.
* For `Jb`/`Jnb`, bit numbers 0-15 test the output port, 16-23 the input port
  and 24 the carry.

Execution takes a variable number of clocks:

* One-byte instructions retire in one clock.
* Two-byte instructions retire in two clocks.

`arinc_ctrl` wires together five parts:

* **`arinc_ctrl_cu`, the control unit.** A two-state Mealy machine (`FETCH`,
  `OPERAND`). Its outputs depend on the state and on the ROM byte of the current
  clock, so a one-byte instruction is decoded and executed in the clock it is
  fetched. It also holds the bit-test multiplexer for `Jb`/`Jnb`.
* **`arinc_ctrl_regfile`, the register file.** It holds PC, SP, the latched
  first byte of a jump, and the carry flag. It obeys per-clock commands: PC
  hold/increment/load, SP push/pop, and write enables.
* **`arinc_ctrl_rom`, the program ROM.** 128 bytes, read asynchronously at PC.
* **`arinc_ctrl_stack`, the stack RAM.** 32 entries of 7 bits, holding return
  addresses. It has a synchronous write and an asynchronous read at SP-1.
* **`arinc_ctrl_ports`, the ports.** An 8-bit input register and a 16-bit
  output register written one bit at a time.

The firmware (`arinc_fw_pkg`) is written as calls to small encoder functions,
like an assembly listing. It loops as follows:

1. If the tx FIFO is not empty, dispatch on the head entry's tag:
   * A control word goes to the transceiver control register.
   * Part one goes to the transmitter's staging register.
   * Part two waits until the transmitter's data register is free, then
     completes the word.

   The entry is then popped.
2. For each receiver that holds a word, if the rx FIFO has room for two entries,
   push part one and part two with their tags, then acknowledge the receiver.

One pass through the loop with nothing to do takes about 10 clocks. At
100 kbps a 32-bit word lasts 8640 clocks, so the controller is never the
bottleneck.

### Transceiver (`arinc_xcvr`)

The transceiver has these parts:

* **Control register.** It holds the control word (`arinc_pkg::xcvr_ctrl_t`):
  * bit 0: parity enable
  * bit 1: even parity
  * bit 2: 25-bit words
  * bit 3: tx low speed
  * bit 4: rx low speed
* **Baud generator.** It makes 10× oversampling ticks. At 24 MHz the divisor is
  24 for 100 kbps and 192 for 12.5 kbps.
* **Transmitter.** It has a staging register, a data register and a shift
  register.
* **Two receivers.**

On the line a bit is bipolar return-to-zero:

* line A high (a one) or line B high (a zero) for half a bit
* null for the other half
* four null bit times between words

The LSB of the 32-bit word goes first. ARINC's bit-reversed label is left to
software.

When parity is enabled:

* The transmitter replaces the last bit with the parity bit. This is odd parity
  unless bit 1 of the control word asks for even.
* The receiver returns the word with that bit replaced by a parity-error flag.

The receiver accepts a bit on the second consecutive non-null sample. A null of
more than 1.5 bit times resets its bit counter, so it re-locks on every
inter-word gap.

### Frame interrupt (`frame_irq`)

The rx FIFO occupancy is compared with twice the frame size, because each word
is two entries. When the two become equal, `arinc_irq_n` pulses low for three
clocks. The default frame size is one word.

## The UART

The UART's FIFOs are both 16×8. The control unit is split into small blocks:

* **`uart_baud_gen`: two stages.** The first stage divides the clock by 16/3
  with a phase accumulator (add 3, wrap at 16), which gives 3 evenly spread
  ticks per 16 clocks. The second stage is a binary counter of those ticks.
  Baud register bit B*k* selects the tap that divides by 2^(k-1). If several
  bits are set the lowest wins, and 0 stops the generator. The output is a
  16×-bit-rate tick, so
  `baud = f_clk · 3/16 / 2^(k-1) / 16` (281 250 baud at B1 with a 24 MHz clock).
* **`uart_tx`** holds an 11-bit frame: start, eight data bits LSB first,
  optional parity and stop. It sends one bit per 16 ticks.
* **`uart_rx`** starts on a low level and re-checks the start bit at its middle.
  It samples every bit at its centre and goes idle after the stop bit.
* **`uart_err`** keeps sticky parity, framing and overrun flags. Overrun means a
  frame completed while the rx FIFO was full, and that byte is dropped. An
  error-reset command clears the flags.
* **`uart_irq`** drives two active-low interrupts, each a three-clock pulse.
  The rx interrupt fires when the rx FIFO count reaches the frame size (default
  8). The tx interrupt fires when the tx FIFO becomes empty. Each has its own
  enable.
* **`uart_reset_ctrl`** merges two reset sources:
  * The external reset is asynchronous to assert and synchronous to release.
  * The software reset bit holds the internal reset for three clocks. The bit
    clears itself because the internal reset clears the command register.
* **`uart_regs`** holds the address decoder, the registers and the read-data
  multiplexer.

## Shared blocks

* **`fifo` and `dpram`.** The RAM has a synchronous write and an asynchronous
  read. Read and write pointers carry an extra wrap bit, which gives the full
  and empty flags and the occupancy. The FIFO is first-word-fall-through: the
  head entry is always visible. Pushes when full and pops when empty are
  ignored. `DEPTH` must be a power of two.
* **`frame_irq`** is the compare-and-pulse interrupt used by both sides.

## Parameters

| module | parameter | default |
|--------|-----------|---------|
| `arinc_uart_top` | `CLK_HZ` | 24 000 000 |
| `arinc_module` | `TX_DEPTH` | 16 |
| `arinc_module` | `RX_DEPTH` | 64 |
| `arinc_module` | `DEFAULT_FRAME` | 1 word |
| `arinc_module` | `HI_BPS` | 100 000 |
| `arinc_module` | `LO_BPS` | 12 500 |
| `arinc_xcvr` | `OVERSAMPLE` | 10 |
| `arinc_ctrl` | `ROM_BYTES` | 128 |
| `arinc_ctrl` | `STACK_DEPTH` | 32 |
| `arinc_ctrl` | `IN_W` | 8 |
| `arinc_ctrl` | `OUT_W` | 16 |
| `arinc_ctrl` | `IMAGE` | firmware |
| `uart` | `FIFO_DEPTH` | 16 |
| `uart` | `DEFAULT_FRAME` | 8 |
| `uart` | `BAUD_CNT_W` | 8 |
| `uart_baud_gen` | `FS_NUM` | 3 |
| `uart_baud_gen` | `FS_DEN` | 16 |

## Where this implementation departs from, or goes beyond, the original design

These parts were designed here, because the original design leaves them
unspecified:

* instruction encoding and cycle counts
* the firmware
* all register maps and bit layouts
* ARINC line timing details, bit order, 25-bit word handling and parity-flag
  reporting
* the receiver's sampling rule
* the ARINC interrupt pulse length (three clocks, copied from the UART)
* the tx-interrupt trigger

Other departures and known limits:

* **UART baud rates.** The first stage is read as a fractional ÷16/3. With a
  24 MHz clock the available rates (281 250, 140 625, … 2 197 baud) include no
  standard rate. Standard rates need a different crystal, or different `FS_NUM`
  and `FS_DEN`.
* **Bus cycle.** An access takes one clock. That meets a 150 ns ARINC read
  cycle easily, but it is 41.7 ns at 24 MHz, slightly above a 40 ns UART cycle.
  The host bus is synchronous; an asynchronous processor bus needs a
  synchroniser in front of the core.
* **ARINC speeds.** Only 100 and 12.5 kbps are offered, not the whole
  12–14.5 kbps low-speed range.
* **Omitted ARINC features.** Label filtering and source/destination
  identification are not implemented. The core is meant for point-to-point
  links.
* **ARINC error reporting.** A parity error reaches the host only as the flag in
  the parity bit position of the received word. Each receiver also detects
  overrun: a new word finishing before the controller took the previous one.
  Overrun is available at the `arinc_xcvr` ports, but no host register reports
  it. The firmware takes a waiting word within a few tens of clocks, and a word
  lasts thousands, so overrun only happens when the receive FIFO stays full.
* **UART error flags.** The UART error flags are read at their own address
  (10), not from the status register. The 8-bit status register has only two
  free bits, too few for three flags. An error reset clears them.
* **Data bus controller.** The UART's data bus controller, the multiplexer that
  picks what drives the read bus, is part of `uart_regs`. It is not a module of
  its own. Likewise the ARINC transceiver's control unit is part of
  `arinc_xcvr`.
* **Transmitter reprogramming.** A control word changes the transmitter speed
  immediately. Software should reload it only when the transmitter is idle
  (status bit 6 clear).

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/tb_arinc_uart_top.sv` runs the whole core at its default parameters with
loopbacks:

* ARINC transmit → receiver 1.
* A behavioural ARINC driver on receiver 2.
* UART `txd` → `rxd`.

It sends words at both ARINC speeds and with parity. It exercises the controller
waiting for a busy transmitter, frame interrupts on both sides, a UART overrun,
an error reset and a software reset. It counts each of these events and fails
if any never happened. It runs about 97 000 clocks (4 ms at 24 MHz) and finishes in under a second.

`tb/tb_frame_sizes.sv` also runs the core at its defaults. It loops the ARINC
transmitter into both receivers and sweeps the programmable frame sizes:

* ARINC frames of 8, 16 and 32 words; the last one fills the 64-entry receive
  FIFO.
* UART frames of every size from 1 to 16 bytes.

For each frame it checks:

* exactly one interrupt, raised when the FIFO holds exactly that frame
* the data, tags and order
* the line timing: back-to-back ARINC words 36 bit times apart (8640 clocks),
  and UART bytes at 281 250 baud

Build any testbench with plain Verilator (5.x). List the packages first:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/arinc_ctrl_pkg.sv rtl/arinc_pkg.sv rtl/uart_pkg.sv rtl/arinc_fw_pkg.sv \
  tb/tb_arinc_uart_top.sv --top-module tb_arinc_uart_top
./obj_dir/Vtb_arinc_uart_top
```

To change the firmware, edit `arinc_fw_pkg::image()`. Each `put(m, addr,
i1/i2(...))` line places one instruction at a hand-chosen address. Or pass a
different `IMAGE` to `arinc_ctrl`; `tb/tb_arinc_ctrl.sv` shows how.
