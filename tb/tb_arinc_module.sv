// Testbench for arinc_module at its default parameters (24 MHz, 16- and
// 64-entry FIFOs), running the real controller firmware. The transmit line is
// looped back into receiver 1; receiver 2 is driven by a behavioural line
// driver. The host programs the frame size (2 words) and a control word, queues
// two words (the second waits for the transmitter), and the test checks that
// the frame interrupt pulses low for 3 clocks when 4 halves are stored, that
// every received word is reassembled from its tagged halves with the right
// receiver number, and that a register read returns its data in the same clock.
module tb_arinc_module;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sel = 0, rd = 0, wr = 0; logic [1:0] addr = 0; logic [15:0] wdata = 0, rdata;
  logic tx_a, tx_b, r2a = 0, r2b = 0, irq_n, fired;
  int checks = 0, failures = 0;

  arinc_module dut (.clk(clk), .rst(rst), .sel(sel), .rd(rd), .wr(wr), .addr(addr), .wdata(wdata),
    .rdata(rdata), .tx_a(tx_a), .tx_b(tx_b), .rx1_a(tx_a), .rx1_b(tx_b), .rx2_a(r2a), .rx2_b(r2b),
    .irq_n(irq_n), .frame_fired(fired));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus_write(input logic [1:0] a, input logic [15:0] d);
    @(negedge clk); sel = 1; wr = 1; addr = a; wdata = d;
    @(negedge clk); sel = 0; wr = 0;
  endtask
  // one-clock read: data is sampled before the end of the clock in which rd is high
  task automatic bus_read(input logic [1:0] a, output logic [15:0] d);
    @(negedge clk); sel = 1; rd = 1; addr = a;
    #1 d = rdata;
    @(negedge clk); sel = 0; rd = 0;
  endtask

  task automatic drive2(input logic [31:0] w);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); r2a = w[i]; r2b = !w[i];
      repeat (120) @(negedge clk);
      r2a = 0; r2b = 0;
      repeat (119) @(negedge clk);
    end
  endtask

  int irq_low = 0, irq_pulses = 0, count_at_irq = -1;
  always @(posedge clk) begin
    if (!irq_n && !rst) irq_low++;
    if (fired) begin irq_pulses++; count_at_irq = int'(dut.rx_count); end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] w1, w2, w3, got1 [$], got2 [$];
    logic [15:0] st, d, lo1, lo2;
    repeat (3) @(posedge clk); rst = 0;
    w1 = $urandom; w2 = $urandom; w3 = $urandom;
    bus_read(2'd3, d); check(d == 16'd1, $sformatf("default frame size %0d", d));
    bus_write(2'd3, 16'd2);
    bus_read(2'd3, d); check(d == 16'd2, "frame size written");
    bus_read(2'd1, st); check(st[3] && st[1], "both FIFOs empty after reset");
    bus_write(2'd0, 16'h0000);                 // control word: 100 kbps, 32 bits, no parity
    bus_write(2'd1, w1[15:0]); bus_write(2'd2, w1[31:16]);
    bus_write(2'd1, w2[15:0]); bus_write(2'd2, w2[31:16]);
    drive2(w3);
    // wait for both loopback words and the rx2 word: 6 halves
    while (dut.rx_count < 6) @(negedge clk);
    check(irq_pulses >= 1 && count_at_irq == 4, $sformatf("frame interrupt at %0d entries", count_at_irq));
    check(irq_low == 3 * irq_pulses, $sformatf("interrupt low %0d clocks for %0d pulses", irq_low, irq_pulses));
    // drain, reassembling halves by their status flags
    for (int n = 0; n < 6; n++) begin
      bus_read(2'd1, st);
      check(!st[3], "status shows data");
      bus_read(2'd0, d);
      if (!st[4]) begin if (st[5]) lo2 = d; else lo1 = d; end
      else begin if (st[5]) got2.push_back({d, lo2}); else got1.push_back({d, lo1}); end
    end
    bus_read(2'd1, st); check(st[3], "receive FIFO empty after draining");
    check(got1.size() == 2 && got1[0] == w1 && got1[1] == w2, "receiver 1 words in order");
    check(got2.size() == 1 && got2[0] == w3, "receiver 2 word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
