// Testbench for arinc_baud_gen at 24 MHz: counts clocks between ticks and checks
// the divisors 24 (100 kbps x 10) and 192 (12.5 kbps x 10) for both outputs,
// and that the two rates are independent.
module tb_arinc_baud_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tx_lo = 0, rx_lo = 0, tx_tick, rx_tick;
  int checks = 0, failures = 0;

  arinc_baud_gen dut (.clk(clk), .rst(rst), .tx_lo(tx_lo), .rx_lo(rx_lo), .tx_tick(tx_tick), .rx_tick(rx_tick));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // measures the period of a tick over several ticks, after settling
  task automatic period(input bit use_tx, output int p);
    int last = -1, c = 0; p = -1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk); #1;
      if (use_tx ? tx_tick : rx_tick) begin
        c++;
        if (c >= 3) begin p = n - last; end
        last = n;
        if (c == 5) break;
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int p;
    repeat (2) @(posedge clk); rst = 0;
    period(1, p); check(p == 24, $sformatf("tx high period %0d", p));
    period(0, p); check(p == 24, $sformatf("rx high period %0d", p));
    tx_lo = 1;
    period(1, p); check(p == 192, $sformatf("tx low period %0d", p));
    period(0, p); check(p == 24, $sformatf("rx stays high %0d", p));
    rx_lo = 1; tx_lo = 0;
    period(0, p); check(p == 192, $sformatf("rx low period %0d", p));
    period(1, p); check(p == 24, $sformatf("tx back to high %0d", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
