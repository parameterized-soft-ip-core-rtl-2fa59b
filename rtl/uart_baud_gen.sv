// UART baud generator, two stages.
// The first stage divides the crystal clock by FS_DEN/FS_NUM (16/3): a phase
// accumulator adds FS_NUM every clock and gives a tick on each overflow past
// FS_DEN, i.e. 3 ticks per 16 clocks, evenly spread. The second stage is a
// CNT_W-bit binary counter of those ticks; its taps divide by 1, 2, 4, ...
// 2^(CNT_W-1). Baud register bit Bk (k = 1..CNT_W, B1 = bit 0) selects the tap
// dividing by 2^(k-1); if several bits are set the lowest wins, and 0 stops the
// generator. The output is a one-clock tick at 16 times the bit rate:
//   f_tick16 = f_clk * FS_NUM / FS_DEN / 2^(k-1), baud = f_tick16 / 16.
// The two stages, the 16/3 first stage, bit-select of the rate and the
// parameterised counter follow the design; reading 16/3 as a fractional divider
// and the one-hot select are this design's interpretation.
module uart_baud_gen #(
  parameter int unsigned CNT_W  = 8,
  parameter int unsigned FS_NUM = 3,
  parameter int unsigned FS_DEN = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [CNT_W-1:0] baud_reg,
  output logic             first_stage_tick,
  output logic             tick16
);
  localparam int unsigned AW = $clog2(FS_DEN + FS_NUM + 1);

  logic [AW-1:0]    acc, acc_next;
  logic [CNT_W-1:0] cnt;
  logic             hit;

  assign acc_next         = acc + AW'(FS_NUM);
  assign first_stage_tick = (acc_next >= AW'(FS_DEN));

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      cnt <= '0;
    end else begin
      acc <= first_stage_tick ? acc_next - AW'(FS_DEN) : acc_next;
      if (first_stage_tick) cnt <= cnt + 1'b1;
    end
  end

  // tap k-1 fires when the k-1 low counter bits are all ones
  always_comb begin
    hit = 1'b0;
    for (int k = CNT_W - 1; k >= 0; k--) begin
      if (baud_reg[k]) hit = (k == 0) ? 1'b1 : &(cnt | ~((CNT_W'(1) << k) - 1'b1));
    end
  end

  assign tick16 = first_stage_tick && hit;
endmodule
