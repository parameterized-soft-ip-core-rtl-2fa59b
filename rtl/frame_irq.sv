// Configurable frame interrupt.
// The receive FIFO occupancy is compared with a threshold taken from the frame
// size register. When the occupancy becomes equal to the threshold (it was
// different in the previous clock) and the interrupt is enabled, irq_n goes low
// for PULSE_CLKS clocks, telling the host that a complete frame can be read
// without polling. A new match during a pulse restarts the pulse.
// The compare-with-frame-size scheme and the three-clock active-low pulse follow
// the design; firing on the change to equality is this design's choice.
module frame_irq #(
  parameter int unsigned CNT_W      = 7,
  parameter int unsigned PULSE_CLKS = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [CNT_W-1:0] count,
  input  logic [CNT_W-1:0] threshold,
  output logic             irq_n,
  output logic             fired     // one-clock marker of a new interrupt
);
  logic match, match_q;
  logic [$clog2(PULSE_CLKS+1)-1:0] remain;

  assign match = (count == threshold) && (threshold != '0);
  assign fired = en && match && !match_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      match_q <= 1'b0;
      remain  <= '0;
    end else begin
      match_q <= match;
      if (fired)            remain <= PULSE_CLKS[$bits(remain)-1:0];
      else if (remain != 0) remain <= remain - 1'b1;
    end
  end

  assign irq_n = (remain == 0);
endmodule
