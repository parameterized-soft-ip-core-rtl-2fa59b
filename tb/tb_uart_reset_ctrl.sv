// Testbench for uart_reset_ctrl: external reset asserts the internal reset at
// once and releases it two clocks after rst_n rises; a software reset request
// holds it for two clocks after the request bit clears (three in all); a model
// command bit that the internal reset clears shows the self-clearing behaviour.
module tb_uart_reset_ctrl;
  logic clk = 0, rst_n = 0, sw_bit = 0, rst;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  uart_reset_ctrl dut (.clk(clk), .ext_rst_n(rst_n), .sw_reset(sw_bit), .rst(rst));

  // model of the command register bit: cleared by the internal reset
  always_ff @(posedge clk) if (rst) sw_bit <= 1'b0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    #1 check(rst, "reset while rst_n low");
    repeat (3) @(negedge clk);
    rst_n = 1;
    n = 0; while (rst && n < 10) begin @(negedge clk); n++; end
    check(n == 2, $sformatf("external release after %0d clocks", n));
    repeat (3) @(negedge clk); check(!rst, "idle");
    sw_bit = 1;
    @(negedge clk); check(rst, "software reset asserts next clock");
    n = 0; while (rst && n < 10) begin @(negedge clk); n++; end
    check(n == 3, $sformatf("software reset held %0d more clocks", n));
    check(!sw_bit, "software reset bit cleared itself");
    repeat (3) @(negedge clk); check(!rst, "stays released");
    @(negedge clk); rst_n = 0; #1 check(rst, "asynchronous assertion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
