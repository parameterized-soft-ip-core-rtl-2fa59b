// Testbench for arinc_tx with a tick every clock (10 clocks per bit).
// A line monitor decodes the bipolar RZ output independently: each bit must be
// A or B high for 5 clocks then null for 5, A and B never both high, at least
// 40 null clocks (4 bit times) between words. Sends 32-bit words without and
// with odd/even parity and 25-bit words, back to back through the data
// register, and checks every decoded word, the ready flag and the word time.
module tb_arinc_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic w25 = 0, par_en = 0, par_even = 0, load_lo = 0, load_hi = 0;
  logic [15:0] din = 0;
  logic ready, busy, a, b, sent;
  int checks = 0, failures = 0;

  arinc_tx dut (.clk(clk), .rst(rst), .tick(1'b1), .w25(w25), .par_en(par_en), .par_even(par_even),
    .din(din), .load_lo(load_lo), .load_hi(load_hi), .ready(ready), .busy(busy),
    .line_a(a), .line_b(b), .word_sent(sent));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // line monitor
  logic [31:0] got [$];
  int min_gap = 1000000, bad_shape = 0;
  initial begin
    logic [31:0] w; int nb, hi_len, lo_len, nbits_exp;
    w = 0; nb = 0; hi_len = 0; lo_len = 100;
    forever begin
      @(posedge clk); #1;
      nbits_exp = w25 ? 25 : 32;
      if (a && b) bad_shape++;
      if (a || b) begin
        if (hi_len == 0) begin
          if (nb == 0 && lo_len < min_gap && got.size() > 0) min_gap = lo_len;
          if (nb > 0 && lo_len != 5) bad_shape++;
          w[nb] = a; nb++;
        end
        hi_len++; lo_len = 0;
      end else begin
        if (hi_len != 0 && hi_len != 5) bad_shape++;
        hi_len = 0; lo_len++;
        if (nb == nbits_exp && lo_len == 5) begin got.push_back(w); w = 0; nb = 0; end
      end
    end
  end

  task automatic send(input logic [31:0] word);
    @(negedge clk); while (!ready) @(negedge clk);
    din = word[15:0]; load_lo = 1; @(negedge clk); load_lo = 0;
    din = word[31:16]; load_hi = 1; @(negedge clk); load_hi = 0;
  endtask

  function automatic logic [31:0] expect_word(logic [31:0] w, bit is25, bit pen, bit peven);
    int n = is25 ? 25 : 32;
    logic p = 0;
    if (is25) w[31:25] = 0;
    for (int i = 0; i < n - 1; i++) p ^= w[i];
    if (pen) w[n-1] = peven ? p : !p;
    return w;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] words [12];
    logic [31:0] exp_q [$];
    int t0, t1;
    repeat (2) @(posedge clk); rst = 0;
    for (int i = 0; i < 12; i++) words[i] = $urandom;
    // mode 0: 32 bits no parity, 1: odd parity, 2: even parity, 3: 25 bits odd parity
    for (int mode = 0; mode < 4; mode++) begin
      @(negedge clk); while (busy || !ready) @(negedge clk);
      par_en = (mode != 0); par_even = (mode == 2); w25 = (mode == 3);
      got.delete(); exp_q.delete();
      t0 = $time;
      for (int k = 0; k < 3; k++) begin
        send(words[3*mode + k]);
        exp_q.push_back(expect_word(words[3*mode + k], w25, par_en, par_even));
      end
      @(negedge clk); while (busy || got.size() < 3) @(negedge clk);
      t1 = $time;
      check(got.size() == 3, $sformatf("mode %0d: %0d words decoded", mode, got.size()));
      for (int k = 0; k < 3 && k < got.size(); k++)
        check(got[k] == exp_q[k], $sformatf("mode %0d word %0d: got %h expected %h", mode, k, got[k], exp_q[k]));
      // three words of n bits plus three gaps of 4 bits, 10 clocks per bit
      check((t1 - t0) / 10 <= 3 * ((w25 ? 25 : 32) + 4) * 10 + 20,
            $sformatf("mode %0d: %0d clocks for three words", mode, (t1 - t0) / 10));
    end
    check(bad_shape == 0, $sformatf("%0d malformed bits", bad_shape));
    check(min_gap >= 45, $sformatf("gap between words %0d clocks, at least 45 (5 null of last bit + 40)", min_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
