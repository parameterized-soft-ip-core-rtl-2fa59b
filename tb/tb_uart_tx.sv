// Testbench for uart_tx with a 16x tick every clock (16 clocks per bit). A
// behavioural receiver samples the line at bit centres and checks start bit,
// data LSB first, parity (even and odd) and stop bit, the frame length (10 or
// 11 bits) and that start is ignored while busy.
module tb_uart_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic par_en = 0, par_odd = 0, start = 0, busy, txd; logic [7:0] data = 0;
  int checks = 0, failures = 0;

  uart_tx dut (.clk(clk), .rst(rst), .tick16(1'b1), .par_en(par_en), .par_odd(par_odd), .start(start),
    .data(data), .busy(busy), .txd(txd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic frame(input logic [7:0] b);
    logic [10:0] bits; int nb, t0, t1;
    nb = par_en ? 11 : 10;
    @(negedge clk); data = b; start = 1;
    fork
      begin
        @(negedge txd); t0 = $time;
        for (int i = 0; i < nb; i++) begin
          #(80 + 160 * i - ($time - t0));
          bits[i] = txd;
        end
        wait (!busy); t1 = $time;
      end
      begin
        @(negedge clk); start = 0; data = ~b;
        // a second start during the frame must be ignored
        repeat (20) @(negedge clk); start = 1; @(negedge clk); start = 0;
      end
    join
    check(bits[0] == 0, "start bit");
    check(bits[8:1] == b, $sformatf("data %h expected %h", bits[8:1], b));
    if (par_en) check(bits[9] == (^b ^ par_odd), "parity bit");
    check(bits[nb-1] == 1, "stop bit");
    check((t1 - t0) / 10 >= nb * 16 - 1 && (t1 - t0) / 10 <= nb * 16 + 1, $sformatf("frame length %0d clocks", (t1 - t0) / 10));
    repeat (40) @(negedge clk);
    check(!busy && txd, "second start ignored, line idle");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    // the frame task starts immediately; the injected start occurs while busy
    for (int k = 0; k < 4; k++) frame(8'($urandom));
    par_en = 1;
    for (int k = 0; k < 3; k++) frame(8'($urandom));
    par_odd = 1;
    for (int k = 0; k < 3; k++) frame(8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
