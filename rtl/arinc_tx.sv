// ARINC-429 transmitter.
// Part one of a word (bits 15:0) is held in a staging register by load_lo;
// load_hi adds bits 31:16 and marks the data register full (ready goes low).
// When the shift register is idle the data register moves into it and the word
// goes out LSB first, one bit per 10 ticks in bipolar return-to-zero form:
// line A high for a one or line B high for a zero during ticks 0-4, both low
// (null) during ticks 5-9. After the last bit the line stays null for four bit
// times before the next word. With 25-bit words only bits 24:0 are sent. With
// parity on, the last bit sent is replaced by the parity bit (odd parity unless
// par_even). Data/shift register structure follows the design; line coding
// details, bit order and gap length are this design's choices.
module arinc_tx #(
  parameter int unsigned OVERSAMPLE = 10,
  parameter int unsigned GAP_BITS   = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        tick,
  input  logic        w25,
  input  logic        par_en,
  input  logic        par_even,
  input  logic [15:0] din,
  input  logic        load_lo,
  input  logic        load_hi,
  output logic        ready,      // data register free
  output logic        busy,       // a word or its gap is on the line
  output logic        line_a,
  output logic        line_b,
  output logic        word_sent   // one clock when the last bit has finished
);
  typedef enum logic [1:0] {T_IDLE, T_BITS, T_GAP} tstate_e;

  tstate_e     st;
  logic [15:0] lo_q;
  logic [31:0] data_q, shreg;
  logic        full;
  logic [5:0]  nbits, bit_cnt;
  logic [$clog2(OVERSAMPLE*GAP_BITS+1)-1:0] sub;
  logic [31:0] word_out;
  logic        par;
  logic        gap_done, start;

  assign nbits = w25 ? 6'd25 : 6'd32;
  assign ready = !full;
  assign busy  = (st != T_IDLE);
  // a waiting word starts on the last gap tick, so back-to-back words are
  // exactly nbits + GAP_BITS bit times apart
  assign gap_done = (st == T_GAP) && int'(sub) == OVERSAMPLE*GAP_BITS - 1;
  assign start    = full && (st == T_IDLE || gap_done);

  // parity over the first nbits-1 bits, placed in bit nbits-1
  always_comb begin
    word_out = data_q;
    if (w25) word_out[31:25] = '0;
    par = 1'b0;
    for (int i = 0; i < 31; i++) if (i < int'(nbits) - 1) par ^= word_out[i];
    if (par_en) word_out[nbits-1] = par_even ? par : ~par;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= T_IDLE;
      lo_q      <= '0;
      data_q    <= '0;
      shreg     <= '0;
      full      <= 1'b0;
      bit_cnt   <= '0;
      sub       <= '0;
      line_a    <= 1'b0;
      line_b    <= 1'b0;
      word_sent <= 1'b0;
    end else begin
      word_sent <= 1'b0;
      if (load_lo) lo_q <= din;
      if (load_hi && !full) begin
        data_q <= {din, lo_q};
        full   <= 1'b1;
      end
      if (tick && start) begin
        shreg   <= word_out;
        full    <= 1'b0;
        bit_cnt <= '0;
        sub     <= '0;
        st      <= T_BITS;
        line_a  <= word_out[0];
        line_b  <= !word_out[0];
      end else if (tick) begin
        unique case (st)
          T_IDLE: ;
          T_BITS: begin
            if (int'(sub) == OVERSAMPLE - 1) begin
              sub <= '0;
              if (bit_cnt == nbits - 1) begin
                st        <= T_GAP;
                word_sent <= 1'b1;
              end else begin
                bit_cnt <= bit_cnt + 1'b1;
                shreg   <= shreg >> 1;
                line_a  <= shreg[1];
                line_b  <= !shreg[1];
              end
            end else begin
              sub <= sub + 1'b1;
              if (int'(sub) == OVERSAMPLE/2 - 1) begin
                line_a <= 1'b0;
                line_b <= 1'b0;
              end
            end
          end
          T_GAP: begin
            if (gap_done) begin
              st  <= T_IDLE;
              sub <= '0;
            end else begin
              sub <= sub + 1'b1;
            end
          end
          default: st <= T_IDLE;
        endcase
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(line_a && line_b));
endmodule
