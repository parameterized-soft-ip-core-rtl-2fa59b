// Testbench for the whole uart at its defaults (16-entry FIFOs, frame size 8).
// txd is looped back to rxd. The host enables both interrupts and writes eight
// bytes; the test waits for the receive interrupt, checks it pulsed low for
// three clocks when the eighth byte arrived, reads the bytes back and compares.
// It also checks the transmit interrupt, the bit time (16 ticks of 16/3 clocks
// = 85.3 clocks at B1, twice that at B2), parity mode, an overrun after more
// than 16 unread bytes, the error reset and the software reset.
module tb_uart;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sel = 0, rd = 0, wr = 0; logic [1:0] addr = 0; logic [7:0] wdata = 0, rdata;
  logic txd, tx_irq_n, rx_irq_n; logic [3:0] ev;
  int checks = 0, failures = 0, rx_irqs = 0, tx_irqs = 0, rx_low = 0;

  uart dut (.clk(clk), .rst_n(rst_n), .sel(sel), .rd(rd), .wr(wr), .addr(addr), .wdata(wdata), .rdata(rdata),
    .txd(txd), .rxd(txd), .tx_irq_n(tx_irq_n), .rx_irq_n(rx_irq_n), .events(ev));

  always @(posedge clk) if (rst_n) begin
    if (ev[3]) tx_irqs++;
    if (ev[2]) rx_irqs++;
    if (!rx_irq_n) rx_low++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic bw(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); sel = 1; wr = 1; addr = a; wdata = d; @(negedge clk); sel = 0; wr = 0;
  endtask
  task automatic br(input logic [1:0] a, output logic [7:0] d);
    @(negedge clk); sel = 1; rd = 1; addr = a; #1 d = rdata; @(negedge clk); sel = 0; rd = 0;
  endtask
  task automatic wait_idle();
    logic [7:0] st;
    do br(U_CMD, st); while (!st[4]);   // tx_ready: FIFO empty and shifter idle
    repeat (200) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] d, st, bytes [8];
    int t0, t1;
    repeat (3) @(negedge clk); rst_n = 1; repeat (4) @(negedge clk);
    br(U_FRAME, d); check(d == 8'd8, "default frame size 8");
    bw(U_CMD, 8'h03);                      // both interrupts, no parity
    for (int i = 0; i < 8; i++) begin bytes[i] = 8'($urandom); bw(U_DATA, bytes[i]); end
    // bit time at B1: measure the first start bit
    @(negedge txd); t0 = $time; @(posedge txd); t1 = $time;
    check((t1 - t0) / 10 >= 80 && (t1 - t0) / 10 <= 92 || bytes[0][0] == 0, $sformatf("start bit %0d clocks at B1", (t1 - t0) / 10));
    wait (rx_irqs == 1);
    br(U_CMD, st); check(st[3] == 0 && st[5], "receive FIFO holds data");
    for (int i = 0; i < 8; i++) begin br(U_DATA, d); check(d == bytes[i], $sformatf("byte %0d %h expected %h", i, d, bytes[i])); end
    wait_idle();
    check(rx_low == 3, $sformatf("receive interrupt low %0d clocks", rx_low));
    check(tx_irqs >= 1, "transmit interrupt");
    br(U_BAUD, d); check(d == 8'h00, "no errors");
    // slower rate B2, with odd parity
    bw(U_BAUD, 8'h02); bw(U_CMD, 8'h0B);
    bw(U_DATA, 8'h01);
    @(negedge txd); t0 = $time; @(posedge txd); t1 = $time;
    check((t1 - t0) / 10 >= 165 && (t1 - t0) / 10 <= 176, $sformatf("start bit %0d clocks at B2", (t1 - t0) / 10));
    wait_idle();
    br(U_DATA, d); check(d == 8'h01, "parity frame received");
    br(U_BAUD, d); check(d == 8'h00, "no parity error in loopback");
    // overrun: 18 bytes, nothing read
    bw(U_BAUD, 8'h01); bw(U_CMD, 8'h00);
    for (int i = 0; i < 18; i++) begin
      do br(U_CMD, st); while (st[1]);     // wait while the transmit FIFO is full
      bw(U_DATA, 8'(i));
    end
    wait_idle();
    br(U_CMD, st); check(st[3], "receive FIFO full");
    br(U_BAUD, d); check(d == 8'h04, $sformatf("overrun flagged, errors %b", d));
    for (int i = 0; i < 16; i++) begin br(U_DATA, d); check(d == 8'(i), "kept bytes in order"); end
    bw(U_CMD, 8'h10); br(U_BAUD, d); check(d == 8'h00, "error reset");
    // software reset restores the frame size
    bw(U_FRAME, 8'd3); bw(U_CMD, 8'h20); repeat (5) @(negedge clk);
    br(U_FRAME, d); check(d == 8'd8, "software reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
