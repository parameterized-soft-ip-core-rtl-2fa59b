// ARINC-429 receiver.
// The two digital outputs of a line receiver (A high = one, B high = zero) are
// synchronised and sampled on every tick (10 per bit). A bit is accepted on the
// second consecutive non-null sample and written into the shift register at the
// current bit position, LSB first. When the word length (32 or 25) is reached
// the word moves to the data register and ready is set until ack. A null lasting
// longer than 1.5 bit times resets the bit position, so the receiver locks to
// the inter-word gap. With parity checking on, the received word's last bit is
// replaced by a parity-error flag (1 = error). Shift register / data register
// structure follows the design; sampling rule, resynchronisation and error
// reporting are this design's choices.
module arinc_rx #(
  parameter int unsigned OVERSAMPLE = 10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        w25,
  input  logic        par_en,
  input  logic        par_even,
  input  logic        line_a,
  input  logic        line_b,
  input  logic        ack,
  output logic        ready,
  output logic [31:0] data,
  output logic        par_err,    // parity error of the word in data
  output logic        overrun     // a word was lost since the last ack
);
  localparam int unsigned RESYNC = OVERSAMPLE + OVERSAMPLE/2;

  logic [1:0]  a_s, b_s;
  logic [1:0]  act_cnt;
  logic [$clog2(RESYNC+1)-1:0] null_cnt;
  logic [5:0]  bit_cnt, nbits;
  logic [31:0] shreg, done_word;
  logic        act, ones, err;

  assign nbits = w25 ? 6'd25 : 6'd32;
  assign act   = a_s[1] | b_s[1];

  // word including the bit being accepted now
  always_comb begin
    done_word = shreg;
    done_word[bit_cnt[4:0]] = a_s[1];
    if (w25) done_word[31:25] = '0;
    ones = ^done_word;
    err  = par_en && (par_even ? ones : !ones);
    if (par_en) done_word[nbits-1] = err;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_s      <= '0;
      b_s      <= '0;
      act_cnt  <= '0;
      null_cnt <= '0;
      bit_cnt  <= '0;
      shreg    <= '0;
      data     <= '0;
      ready    <= 1'b0;
      par_err  <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      a_s <= {a_s[0], line_a};
      b_s <= {b_s[0], line_b};
      if (ack) begin
        ready   <= 1'b0;
        overrun <= 1'b0;
      end
      if (tick) begin
        if (act) begin
          null_cnt <= '0;
          if (act_cnt != 2'd3) act_cnt <= act_cnt + 1'b1;
          if (act_cnt == 2'd1) begin
            if (bit_cnt == nbits - 1) begin
              bit_cnt <= '0;
              shreg   <= '0;
              data    <= done_word;
              par_err <= err;
              ready   <= 1'b1;
              if (ready && !ack) overrun <= 1'b1;
            end else begin
              shreg[bit_cnt[4:0]] <= a_s[1];
              bit_cnt <= bit_cnt + 1'b1;
            end
          end
        end else begin
          act_cnt <= '0;
          if (int'(null_cnt) < RESYNC) null_cnt <= null_cnt + 1'b1;
          else begin
            bit_cnt <= '0;
            shreg   <= '0;
          end
        end
      end
    end
  end
endmodule
