// UART transmit shifter.
// An 11-bit shift register is loaded with start bit, eight data bits, parity
// bit and stop bit and shifted out LSB first, one bit every 16 ticks of the
// baud generator. Without parity the frame is 10 bits (the parity slot is
// skipped). The line idles high. start is accepted only while idle (busy low).
// The 11-bit frame and its order follow the design; the parity sense input and
// the optional parity bit are this design's choices.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick16,
  input  logic       par_en,
  input  logic       par_odd,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       txd
);
  logic [10:0] shreg;
  logic [3:0]  bits_left, sub;
  logic        par;

  assign par = ^data ^ par_odd;
  assign busy = (bits_left != 0);
  assign txd  = busy ? shreg[0] : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      sub       <= '0;
    end else if (!busy) begin
      if (start) begin
        shreg     <= par_en ? {1'b1, par, data, 1'b0} : {1'b1, 1'b1, data, 1'b0};
        bits_left <= par_en ? 4'd11 : 4'd10;
        sub       <= '0;
      end
    end else if (tick16) begin
      sub <= sub + 1'b1;
      if (sub == 4'd15) begin
        // without parity the stop bit sits at bit 9 and bit 10 is a spare 1
        shreg     <= {1'b1, shreg[10:1]};
        bits_left <= bits_left - 1'b1;
      end
    end
  end
endmodule
