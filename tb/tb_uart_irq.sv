// Testbench for uart_irq: the receive interrupt pulses low for three clocks
// when the FIFO count reaches the frame size, the transmit interrupt when the
// transmit FIFO becomes empty; each only when enabled.
module tb_uart_irq;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic tx_ie = 0, rx_ie = 0, tx_empty = 1, txn, rxn, txf, rxf;
  logic [4:0] cnt = 0, fsz = 5'd8;
  int checks = 0, failures = 0, tx_low = 0, rx_low = 0;

  uart_irq dut (.clk(clk), .rst(rst), .tx_ie(tx_ie), .rx_ie(rx_ie), .tx_empty(tx_empty), .rx_count(cnt),
    .frame_size(fsz), .tx_irq_n(txn), .rx_irq_n(rxn), .tx_fired(txf), .rx_fired(rxf));

  always @(posedge clk) if (!rst) begin if (!txn) tx_low++; if (!rxn) rx_low++; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic fill_to(input int n);
    for (int i = 0; i <= n; i++) begin @(negedge clk); cnt = 5'(i); end
    repeat (6) @(negedge clk); cnt = 0; repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    repeat (3) @(negedge clk); tx_low = 0; rx_low = 0;
    fill_to(10); check(rx_low == 0, "rx disabled");
    rx_ie = 1;
    fill_to(7); check(rx_low == 0, "below frame size");
    fill_to(8); check(rx_low == 3, $sformatf("rx pulse %0d clocks", rx_low));
    fsz = 5'd16; rx_low = 0;
    fill_to(16); check(rx_low == 3, "frame size 16");
    @(negedge clk); tx_empty = 0; repeat (5) @(negedge clk); tx_empty = 1; repeat (6) @(negedge clk);
    check(tx_low == 0, "tx disabled");
    tx_ie = 1;
    @(negedge clk); tx_empty = 0; repeat (5) @(negedge clk); tx_empty = 1; repeat (6) @(negedge clk);
    check(tx_low == 3, $sformatf("tx pulse %0d clocks", tx_low));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
