// End-to-end testbench for arinc_uart_top at its default parameters (24 MHz).
// The ARINC transmit pair is looped back into receiver 1, receiver 2 is driven
// by a behavioural ARINC line driver, and the UART's txd is looped to rxd. The
// host, modelled by bus tasks, runs both interfaces at once:
//  ARINC: frame size 2 words; three words at 100 kbps, one of them queued while
//         the transmitter is busy (the controller must wait); then a control
//         word switching to 12.5 kbps with odd parity and one more word; one
//         word on receiver 2. All words are read back through the tagged FIFO.
//  UART:  eight bytes with both interrupts on (frame interrupt at 8 bytes),
//         then 18 unread bytes to force an overrun, error reset, software reset.
// Each mechanism is counted and a mechanism that never happened is a failure.
// Host reads and writes complete in one clock (41.7 ns at 24 MHz).
module tb_arinc_uart_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cs = 0, rd = 0, wr = 0; logic [3:0] addr = 0; logic [15:0] wdata = 0, rdata;
  logic oe, tx_a, tx_b, r2a = 0, r2b = 0, a_irq_n, u_txd, u_tx_irq_n, u_rx_irq_n;
  int checks = 0, failures = 0;

  arinc_uart_top dut (.clk(clk), .rst_n(rst_n), .bus_cs(cs), .bus_rd(rd), .bus_wr(wr), .bus_addr(addr),
    .bus_wdata(wdata), .bus_rdata(rdata), .bus_rdata_oe(oe), .a429_tx_a(tx_a), .a429_tx_b(tx_b),
    .a429_rx1_a(tx_a), .a429_rx1_b(tx_b), .a429_rx2_a(r2a), .a429_rx2_b(r2b), .arinc_irq_n(a_irq_n),
    .uart_txd(u_txd), .uart_rxd(u_txd), .uart_tx_irq_n(u_tx_irq_n), .uart_rx_irq_n(u_rx_irq_n));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---- mechanism counters ----
  int n_a_sent = 0, n_a_rx1 = 0, n_a_rx2 = 0, n_a_irq = 0, n_a_wait = 0, n_a_lo = 0, n_a_par = 0;
  int n_u_rx = 0, n_u_rxirq = 0, n_u_txirq = 0, n_u_ovr = 0, n_u_errrst = 0, n_u_swrst = 0, n_rd1clk = 0;
  always @(posedge clk) if (rst_n) begin
    n_a_sent += int'(dut.u_arinc.tx_word_sent);
    n_a_rx1  += int'(dut.u_arinc.out_port[arinc_fw_pkg::OUT_ACK1]);
    n_a_rx2  += int'(dut.u_arinc.out_port[arinc_fw_pkg::OUT_ACK2]);
    n_a_irq  += int'(dut.u_arinc.frame_fired);
    n_a_wait += int'(dut.u_arinc.u_ctrl.pc_o == 7'h12 && !dut.u_arinc.u_ctrl.u_cu.operand && !dut.u_arinc.tx_ready);
    n_a_lo   += int'(dut.u_arinc.tx_word_sent && dut.u_arinc.ctrl_q.tx_lo);
    n_a_par  += int'(dut.u_arinc.tx_word_sent && dut.u_arinc.ctrl_q.par_en);
    n_u_rx    += int'(dut.u_uart.events[1]);
    n_u_rxirq += int'(dut.u_uart.events[2]);
    n_u_txirq += int'(dut.u_uart.events[3]);
    n_u_ovr   += int'(dut.u_uart.events[0]);
    n_u_errrst += int'(dut.u_uart.err_reset);
    n_u_swrst  += int'(dut.u_uart.cmd_q.sw_reset);
  end

  // the ARINC and UART threads share the bus: one access at a time
  bit bus_busy = 0;
  task automatic bus_get();
    @(negedge clk);
    while (bus_busy) @(negedge clk);
    bus_busy = 1;
  endtask
  task automatic bw(input logic [3:0] a, input logic [15:0] d);
    bus_get(); cs = 1; wr = 1; addr = a; wdata = d; @(negedge clk); cs = 0; wr = 0; bus_busy = 0;
  endtask
  task automatic br(input logic [3:0] a, output logic [15:0] d);
    bus_get(); cs = 1; rd = 1; addr = a;
    #1 d = rdata; if (oe) n_rd1clk++;
    @(negedge clk); cs = 0; rd = 0; bus_busy = 0;
  endtask

  task automatic drive2(input logic [31:0] w);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); r2a = w[i]; r2b = !w[i];
      repeat (120) @(negedge clk); r2a = 0; r2b = 0; repeat (119) @(negedge clk);
    end
  endtask

  // drains the ARINC receive FIFO, rebuilding words from their tags
  logic [31:0] got1 [$], got2 [$];
  task automatic arinc_drain();
    logic [15:0] st, d, lo1, lo2;
    forever begin
      br(4'd1, st);
      if (st[3]) break;
      br(4'd0, d);
      if (!st[4]) begin if (st[5]) lo2 = d; else lo1 = d; end
      else begin if (st[5]) got2.push_back({d, lo2}); else got1.push_back({d, lo1}); end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog: arinc sent=%0d rx1=%0d rx2=%0d uart rx=%0d rxirq=%0d", n_a_sent, n_a_rx1, n_a_rx2, n_u_rx, n_u_rxirq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] aw [4], w_rx2;
  logic [7:0]  ub [8];

  task automatic arinc_side();
    logic [31:0] w4;
    bw(4'd3, 16'd2);                       // frame = 2 words
    bw(4'd0, 16'h0000);                    // 100 kbps, 32-bit, no parity
    for (int i = 0; i < 3; i++) begin bw(4'd1, aw[i][15:0]); bw(4'd2, aw[i][31:16]); end
    fork drive2(w_rx2); join_none
    wait (n_a_sent == 3);
    bw(4'd0, 16'h0019);                    // 12.5 kbps both ways, odd parity
    w4 = aw[3]; w4[31] = 1'b0;
    bw(4'd1, w4[15:0]); bw(4'd2, w4[31:16]);
    wait (n_a_sent == 4);
    repeat (3000) @(negedge clk);
    arinc_drain();
    check(got1.size() == 4, $sformatf("receiver 1 got %0d words", got1.size()));
    for (int i = 0; i < 3 && i < got1.size(); i++) check(got1[i] == aw[i], $sformatf("ARINC word %0d", i));
    // parity word: bit 31 carried the generated parity, received with flag 0
    if (got1.size() == 4) check(got1[3] == {1'b0, aw[3][30:0]}, $sformatf("parity word %h", got1[3]));
    check(got2.size() == 1 && got2[0] == w_rx2, "receiver 2 word");
  endtask

  task automatic uart_side();
    logic [15:0] d, st;
    bw(4'h9, 16'h0003);                    // UART command: both interrupts
    for (int i = 0; i < 8; i++) bw(4'h8, {8'h00, ub[i]});
    wait (n_u_rxirq == 1);
    for (int i = 0; i < 8; i++) begin br(4'h8, d); check(d[7:0] == ub[i], $sformatf("UART byte %0d", i)); end
    for (int i = 0; i < 18; i++) begin
      do br(4'h9, st); while (st[1]);
      bw(4'h8, 16'(i));
    end
    do br(4'h9, st); while (!st[4]);
    repeat (400) @(negedge clk);
    br(4'hA, d); check(d[2], "UART overrun flag");
    bw(4'h9, 16'h0010); br(4'hA, d); check(d[2:0] == 0, "UART error reset");
    bw(4'hB, 16'd4); bw(4'h9, 16'h0020); repeat (5) @(negedge clk);
    br(4'hB, d); check(d == 16'd8, "UART software reset");
  endtask

  initial begin
    for (int i = 0; i < 4; i++) aw[i] = $urandom;
    w_rx2 = $urandom;
    for (int i = 0; i < 8; i++) ub[i] = 8'($urandom);
    repeat (3) @(negedge clk); rst_n = 1; repeat (4) @(negedge clk);
    fork arinc_side(); uart_side(); join
    check(n_a_sent == 4, "ARINC words sent");
    check(n_a_rx1 == 4 && n_a_rx2 == 1, "ARINC words acknowledged per receiver");
    check(n_a_irq > 0, "ARINC frame interrupt");
    check(n_a_wait > 0, "controller waited for the transmitter");
    check(n_a_lo == 1, "ARINC low-speed word");
    check(n_a_par == 1, "ARINC parity word");
    check(n_u_rx >= 26, $sformatf("UART frames received %0d", n_u_rx));
    check(n_u_rxirq > 0, "UART receive interrupt");
    check(n_u_txirq > 0, "UART transmit interrupt");
    check(n_u_ovr > 0, "UART overrun");
    check(n_u_errrst > 0, "UART error reset");
    check(n_u_swrst > 0, "UART software reset");
    check(n_rd1clk > 0, "one-clock host reads");
    $display("mechanisms: arinc sent=%0d rx1=%0d rx2=%0d irq=%0d wait=%0d lo=%0d par=%0d | uart rx=%0d rxirq=%0d txirq=%0d ovr=%0d errrst=%0d swrst=%0d",
             n_a_sent, n_a_rx1, n_a_rx2, n_a_irq, n_a_wait, n_a_lo, n_a_par, n_u_rx, n_u_rxirq, n_u_txirq, n_u_ovr, n_u_errrst, n_u_swrst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
