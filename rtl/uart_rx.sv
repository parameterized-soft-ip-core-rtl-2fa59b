// UART receive shifter.
// The serial input is synchronised, then watched on every 16x tick. A low level
// while idle starts a frame; the start bit is checked again at its middle (8
// ticks later) to reject glitches, and every following bit is sampled at its
// middle, 16 ticks apart, into the shift register: eight data bits LSB first,
// the parity bit when enabled, and the stop bit. After the stop bit the receiver
// returns to idle and valid pulses for one clock with the byte and the error
// checks of this frame (parity mismatch, stop bit low). Middle sampling and the
// return to idle after each frame follow the design.
module uart_rx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick16,
  input  logic       par_en,
  input  logic       par_odd,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data,
  output logic       par_err,
  output logic       frm_err,
  output logic       busy
);
  logic [1:0]  sync;
  logic [3:0]  sub, nbits, bit_idx;
  logic [10:0] shreg;
  logic        in;

  assign in    = sync[1];
  assign nbits = par_en ? 4'd11 : 4'd10;   // bits including start and stop

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= 2'b11;
      sub     <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      busy    <= 1'b0;
      valid   <= 1'b0;
      data    <= '0;
      par_err <= 1'b0;
      frm_err <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      if (tick16) begin
        if (!busy) begin
          if (!in) begin
            busy    <= 1'b1;
            sub     <= 4'd1;
            bit_idx <= '0;
          end
        end else begin
          sub <= sub + 1'b1;
          if (sub == 4'd7) begin           // middle of a bit
            if (bit_idx == 0 && in) begin
              busy <= 1'b0;                // false start
            end else begin
              shreg[bit_idx] <= in;
              if (bit_idx == nbits - 1) begin
                busy    <= 1'b0;
                valid   <= 1'b1;
                data    <= shreg[8:1];
                par_err <= par_en && (^shreg[9:1] != par_odd);
                frm_err <= !in;
              end
              bit_idx <= bit_idx + 1'b1;
            end
          end
        end
      end
    end
  end
endmodule
