// Testbench for uart_baud_gen: after reset, counts first-stage ticks and 16x
// ticks over 16384 clocks for each baud register bit. Expected counts come from
// f_clk * 3/16 / 2^(k-1): 3072 first-stage ticks, 3072 >> (k-1) output ticks.
// Also checks that the lowest set bit wins, that 0 stops the output, and that
// first-stage ticks are never closer than 5 clocks (16/3 = 5.33).
module tb_uart_baud_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] baud = 0; logic fs, t16;
  int checks = 0, failures = 0;

  uart_baud_gen dut (.clk(clk), .rst(rst), .baud_reg(baud), .first_stage_tick(fs), .tick16(t16));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input logic [7:0] b, output int nfs, output int nt, output int min_sp);
    int last = -100;
    nfs = 0; nt = 0; min_sp = 1000;
    @(negedge clk); rst = 1; baud = b; @(negedge clk); rst = 0;
    for (int c = 0; c < 16384; c++) begin
      @(posedge clk); #1;
      if (fs) begin nfs++; if (c - last < min_sp) min_sp = c - last; last = c; end
      if (t16) nt++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nfs, nt, sp;
    for (int k = 0; k < 8; k++) begin
      run(8'(1 << k), nfs, nt, sp);
      check(nfs == 3072, $sformatf("first stage ticks %0d", nfs));
      check(nt == (3072 >> k), $sformatf("B%0d: %0d ticks, expected %0d", k + 1, nt, 3072 >> k));
      check(sp >= 5 && sp <= 6, $sformatf("first stage spacing %0d", sp));
    end
    run(8'h0C, nfs, nt, sp); check(nt == 768, $sformatf("lowest set bit wins: %0d", nt));
    run(8'h00, nfs, nt, sp); check(nt == 0, "zero stops the generator");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
