// UART reset controller.
// Combines the external reset (asynchronous, active low) and the software reset
// bit of the command register into one synchronous, active-high internal reset.
// The external reset is passed through a two-flop synchroniser that asserts at
// once and releases on the clock. A software reset request holds the internal
// reset for RST_CLKS clocks; since the command register is itself cleared by the
// internal reset, the software reset bit returns to zero on its own. Both
// sources and the self-clearing bit follow the design; the synchroniser and the
// pulse length are this design's choices.
module uart_reset_ctrl #(
  parameter int unsigned RST_CLKS = 2
) (
  input  logic clk,
  input  logic ext_rst_n,
  input  logic sw_reset,
  output logic rst
);
  logic [1:0] sync;
  logic [$clog2(RST_CLKS+1)-1:0] hold;

  always_ff @(posedge clk or negedge ext_rst_n) begin
    if (!ext_rst_n) sync <= 2'b11;
    else            sync <= {sync[0], 1'b0};
  end

  always_ff @(posedge clk) begin
    if (sync[1])        hold <= '0;
    else if (sw_reset)  hold <= $bits(hold)'(RST_CLKS);
    else if (hold != 0) hold <= hold - 1'b1;
  end

  assign rst = sync[1] || (hold != 0);
endmodule
