// Testbench for arinc_xcvr at its default 24 MHz clock. The transmitter output
// is looped back into receiver 1; receiver 2 is driven by a behavioural line
// driver. Checks: control word loading (parity on, high and low speed), words
// received on both channels, the measured bit period (240 clocks at 100 kbps,
// 1920 at 12.5 kbps) and independence of the two receivers.
module tb_arinc_xcvr;
  import arinc_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [15:0] din = 0;
  logic ctrl_load = 0, load_lo = 0, load_hi = 0, tx_ready, tx_busy, tx_a, tx_b;
  logic r2a = 0, r2b = 0, ack1 = 0, ack2 = 0, rdy1, rdy2, ovr1, ovr2, perr1, perr2, sent;
  logic [31:0] d1, d2;
  xcvr_ctrl_t ctrl_q;
  int checks = 0, failures = 0;

  arinc_xcvr dut (.clk(clk), .rst(rst), .din(din), .ctrl_load(ctrl_load), .load_lo(load_lo), .load_hi(load_hi),
    .tx_ready(tx_ready), .tx_busy(tx_busy), .tx_a(tx_a), .tx_b(tx_b),
    .rx1_a(tx_a), .rx1_b(tx_b), .rx2_a(r2a), .rx2_b(r2b), .rx1_ack(ack1), .rx2_ack(ack2),
    .rx1_ready(rdy1), .rx2_ready(rdy2), .rx1_data(d1), .rx2_data(d2), .rx1_overrun(ovr1), .rx2_overrun(ovr2),
    .rx1_perr(perr1), .rx2_perr(perr2), .tx_word_sent(sent), .ctrl_q(ctrl_q));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic strobe(ref logic s, input logic [15:0] v);
    @(negedge clk); din = v; s = 1; @(negedge clk); s = 0;
  endtask

  task automatic drive2(input logic [31:0] w, input int clk_per_bit);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); r2a = w[i]; r2b = !w[i];
      repeat (clk_per_bit / 2) @(negedge clk);
      r2a = 0; r2b = 0;
      repeat (clk_per_bit / 2 - 1) @(negedge clk);
    end
    repeat (4 * clk_per_bit) @(negedge clk);
  endtask

  // measures clocks between the first two bit starts on the transmit line
  int bit_period;
  task automatic measure();
    int t0;
    @(posedge (tx_a | tx_b)); t0 = $time;
    @(negedge (tx_a | tx_b)); @(posedge (tx_a | tx_b));
    bit_period = ($time - t0) / 10;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] w1, w2;
    repeat (2) @(posedge clk); rst = 0;
    // high speed, odd parity
    strobe(ctrl_load, 16'h0001);
    check(ctrl_q.par_en && !ctrl_q.tx_lo, "control word loaded");
    w1 = $urandom; w1[31] = !(^w1[30:0]);
    w2 = $urandom;
    strobe(load_lo, w1[15:0]); strobe(load_hi, w1[31:16]);
    fork
      measure();
      drive2(w2, 240);
    join
    check(bit_period == 240, $sformatf("100 kbps bit period %0d clocks", bit_period));
    wait (rdy1);
    check(d1 == {1'b0, w1[30:0]} && !perr1, $sformatf("rx1 loopback %h vs %h", d1, w1));
    check(rdy2, "rx2 word ready");
    // odd parity: the flag in bit 31 is set when the driven word has even weight
    check(d2 == {!(^w2), w2[30:0]} && perr2 == !(^w2), $sformatf("rx2 data %h driven %h", d2, w2));
    @(negedge clk); ack1 = 1; ack2 = 1; @(negedge clk); ack1 = 0; ack2 = 0;
    check(!rdy1 && !rdy2, "acks clear ready");
    // low speed both ways, no parity
    strobe(ctrl_load, 16'h0018);
    w1 = $urandom;
    strobe(load_lo, w1[15:0]); strobe(load_hi, w1[31:16]);
    measure();
    check(bit_period == 1920, $sformatf("12.5 kbps bit period %0d clocks", bit_period));
    wait (rdy1);
    check(d1 == w1, $sformatf("rx1 low speed %h vs %h", d1, w1));
    check(!rdy2, "rx2 idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
