// Testbench for frame_irq: sweeps the count past the threshold and checks that
// irq_n goes low exactly once per match, for exactly three clocks, starting one
// clock after the match, and never while disabled or with threshold zero.
module tb_frame_irq;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic en; logic [6:0] count, thr; logic irq_n, fired;
  int checks = 0, failures = 0;

  frame_irq #(.CNT_W(7), .PULSE_CLKS(3)) dut (.clk(clk), .rst(rst), .en(en), .count(count),
    .threshold(thr), .irq_n(irq_n), .fired(fired));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // count up to 20 and down again, recording the low cycles of irq_n
  task automatic sweep(input bit e, input int t, output int low_clks, output int first_low);
    low_clks = 0; first_low = -1;
    en = e; thr = 7'(t);
    for (int c = 0; c < 45; c++) begin
      @(negedge clk);
      count = 7'(c < 20 ? c : (c < 25 ? 20 : 45 - c));
      if (!irq_n) begin low_clks++; if (first_low < 0) first_low = c; end
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    int lows, first;
    en = 0; count = 0; thr = 0;
    repeat (2) @(posedge clk); rst = 0;
    sweep(1, 8, lows, first);
    // count goes 8 on the way up (c=8) and on the way down (c=37): two pulses
    check(lows == 6, $sformatf("two 3-clock pulses, got %0d low clocks", lows));
    check(first == 9, $sformatf("pulse starts one clock after the match, got %0d", first));
    sweep(0, 8, lows, first);
    check(lows == 0, "disabled");
    sweep(1, 0, lows, first);
    check(lows == 0, "threshold zero");
    sweep(1, 20, lows, first);
    check(lows == 3, $sformatf("plateau gives one pulse, got %0d", lows));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
