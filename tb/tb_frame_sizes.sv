// Frame-size workload for arinc_uart_top at its default parameters (24 MHz),
// arranged like a bench test of the interface: the ARINC transmitter is looped
// back into both receivers and the UART's txd into its rxd, and a host model
// programs a frame size, sends one frame, waits for the frame interrupt and
// reads the frame back.
//  ARINC: frames of 8, 16 and 32 words at 100 kbps. Each word sent arrives on
//         both receivers, so a frame of N words is N/2 words sent. The largest
//         frame fills the 64-entry receive FIFO exactly. The host keeps the
//         16-entry transmit FIFO topped up by polling its full flag.
//  UART:  every frame size from one byte to the 16-byte receive FIFO.
// Checks: exactly one interrupt per frame, raised when the FIFO holds exactly
// one frame and not before the last word or byte has arrived; data, receiver
// tags and order; back-to-back ARINC words 36 bit times apart (32 bits plus a
// 4-bit gap, 8640 clocks at 100 kbps); back-to-back UART bytes 10 bit times
// apart at 24 MHz * 3/16 / 16 = 281 250 baud (15 bytes in 12 800 clocks).
module tb_frame_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cs = 0, rd = 0, wr = 0; logic [3:0] addr = 0; logic [15:0] wdata = 0, rdata;
  logic oe, tx_a, tx_b, a_irq_n, u_txd, u_tx_irq_n, u_rx_irq_n;
  int checks = 0, failures = 0;

  arinc_uart_top dut (.clk(clk), .rst_n(rst_n), .bus_cs(cs), .bus_rd(rd), .bus_wr(wr), .bus_addr(addr),
    .bus_wdata(wdata), .bus_rdata(rdata), .bus_rdata_oe(oe), .a429_tx_a(tx_a), .a429_tx_b(tx_b),
    .a429_rx1_a(tx_a), .a429_rx1_b(tx_b), .a429_rx2_a(tx_a), .a429_rx2_b(tx_b), .arinc_irq_n(a_irq_n),
    .uart_txd(u_txd), .uart_rxd(u_txd), .uart_tx_irq_n(u_tx_irq_n), .uart_rx_irq_n(u_rx_irq_n));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- event monitors: interrupt falling edges, words sent, bytes received ----
  longint cyc = 0;
  int a_irqs = 0, u_irqs = 0, a_sent = 0, u_rxd = 0;
  longint a_sent_at [$], u_rx_at [$];
  logic a_irq_d = 1, u_irq_d = 1;
  always @(posedge clk) begin
    cyc++;
    a_irq_d <= a_irq_n; u_irq_d <= u_rx_irq_n;
    if (rst_n) begin
      if (a_irq_d && !a_irq_n) a_irqs++;
      if (u_irq_d && !u_rx_irq_n) u_irqs++;
      if (dut.u_arinc.tx_word_sent) begin a_sent++; a_sent_at.push_back(cyc); end
      if (dut.u_uart.events[1]) begin u_rxd++; u_rx_at.push_back(cyc); end
    end
  end

  task automatic bw(input logic [3:0] a, input logic [15:0] d);
    @(negedge clk); cs = 1; wr = 1; addr = a; wdata = d; @(negedge clk); cs = 0; wr = 0;
  endtask
  task automatic br(input logic [3:0] a, output logic [15:0] d);
    @(negedge clk); cs = 1; rd = 1; addr = a; #1 d = rdata; @(negedge clk); cs = 0; rd = 0;
  endtask
  // one word = two writes to the transmit FIFO; waits while it is full
  task automatic tx_put(input logic [15:0] d, input logic [3:0] a);
    logic [15:0] st;
    do br(4'd1, st); while (st[0]);
    bw(a, d);
  endtask

  task automatic arinc_frame(input int words);
    logic [31:0] sent [$], got1 [$], got2 [$];
    logic [15:0] st, d, lo1 = 0, lo2 = 0;
    int irq0 = a_irqs, sent0 = a_sent, n = words / 2;
    bw(4'd3, 16'(words));
    for (int i = 0; i < n; i++) begin
      logic [31:0] w = {$urandom()};
      sent.push_back(w);
      tx_put(w[15:0], 4'd1);
      tx_put(w[31:16], 4'd2);
    end
    // the frame interrupt must come, once, when the frame is complete
    for (int t = 0; t < n * 8640 + 40_000 && !(a_irqs > irq0); t++) @(posedge clk);
    check(a_irqs == irq0 + 1, $sformatf("ARINC frame %0d: interrupt seen", words));
    br(4'd1, st);
    check(st[13:7] == 7'(2 * words), $sformatf("ARINC frame %0d: FIFO holds %0d entries at the interrupt", words, st[13:7]));
    // back-to-back words: 36 bit times of 240 clocks apart
    for (int i = sent0 + 1; i < a_sent; i++)
      check(a_sent_at[i] - a_sent_at[i-1] == 8640,
            $sformatf("ARINC word spacing %0d clocks", a_sent_at[i] - a_sent_at[i-1]));
    // the sent strobe comes at the end of the last bit's null half, after the
    // receivers have taken that bit
    repeat (20_000) @(posedge clk);
    check(a_sent == sent0 + n, $sformatf("ARINC frame %0d: %0d of %0d words sent", words, a_sent - sent0, n));
    check(a_irqs == irq0 + 1, $sformatf("ARINC frame %0d: one interrupt only", words));
    // read the frame back, rebuilding words from the tags
    forever begin
      br(4'd1, st);
      if (st[3]) break;
      br(4'd0, d);
      if (!st[4]) begin if (st[5]) lo2 = d; else lo1 = d; end
      else if (st[5]) got2.push_back({d, lo2});
      else            got1.push_back({d, lo1});
    end
    check(got1.size() == n && got2.size() == n,
          $sformatf("ARINC frame %0d: %0d/%0d words per receiver", words, got1.size(), got2.size()));
    foreach (sent[i]) begin
      if (i < got1.size()) check(got1[i] == sent[i], $sformatf("receiver 1 word %0d %h/%h", i, got1[i], sent[i]));
      if (i < got2.size()) check(got2[i] == sent[i], $sformatf("receiver 2 word %0d %h/%h", i, got2[i], sent[i]));
    end
  endtask

  task automatic uart_frame(input int bytes);
    logic [7:0] sent [$];
    logic [15:0] st, d;
    int irq0 = u_irqs, rx0 = u_rxd;
    bw(4'd11, 16'(bytes));
    for (int i = 0; i < bytes; i++) begin
      logic [7:0] b = 8'($urandom());
      sent.push_back(b);
      bw(4'd8, {8'h00, b});
    end
    for (int t = 0; t < bytes * 1000 + 5_000 && !(u_irqs > irq0); t++) @(posedge clk);
    check(u_irqs == irq0 + 1, $sformatf("UART frame %0d: interrupt seen", bytes));
    check(u_rxd == rx0 + bytes, $sformatf("UART frame %0d: %0d bytes in at the interrupt", bytes, u_rxd - rx0));
    if (bytes == 16)
      check(u_rx_at[rx0 + 15] - u_rx_at[rx0] inside {[12_798:12_802]},
            $sformatf("UART 15 byte times = %0d clocks", u_rx_at[rx0 + 15] - u_rx_at[rx0]));
    repeat (3_000) @(posedge clk);
    check(u_irqs == irq0 + 1, $sformatf("UART frame %0d: one interrupt only", bytes));
    foreach (sent[i]) begin
      br(4'd8, d);
      check(d[7:0] == sent[i], $sformatf("UART frame %0d byte %0d %h/%h", bytes, i, d[7:0], sent[i]));
    end
    br(4'd9, st);
    check(st[2], $sformatf("UART frame %0d: receive FIFO empty after the frame", bytes));
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int words = 8; words <= 32; words *= 2) arinc_frame(words);
    bw(4'd9, 16'h0002);                 // receive interrupt enabled, no parity
    for (int f = 1; f <= 16; f++) uart_frame(f);
    $display("frames: arinc irq=%0d words sent=%0d | uart irq=%0d bytes=%0d", a_irqs, a_sent, u_irqs, u_rxd);
    check(a_irqs == 3 && u_irqs == 16, "one interrupt per frame overall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
