// Testbench for uart_rx with a 16x tick every clock. A behavioural transmitter
// drives frames with 16 clocks per bit. Checks data bytes, parity error with
// even and odd parity, framing error on a low stop bit, and that a short low
// glitch is not taken as a start bit.
module tb_uart_rx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic par_en = 0, par_odd = 0, rxd = 1, valid, perr, ferr, busy; logic [7:0] data;
  int checks = 0, failures = 0;
  int nvalid = 0; logic [7:0] last_data; logic last_perr, last_ferr;

  uart_rx dut (.clk(clk), .rst(rst), .tick16(1'b1), .par_en(par_en), .par_odd(par_odd), .rxd(rxd),
    .valid(valid), .data(data), .par_err(perr), .frm_err(ferr), .busy(busy));

  always @(posedge clk) if (valid) begin nvalid++; last_data = data; last_perr = perr; last_ferr = ferr; end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(input logic [7:0] b, input int cpb, input bit bad_par, input bit bad_stop);
    logic [10:0] f; int nb;
    f = {1'b1, ^b ^ par_odd ^ bad_par, b, 1'b0};
    nb = par_en ? 11 : 10;
    if (!par_en) f[9] = 1'b1;
    if (bad_stop) f[nb-1] = 1'b0;
    for (int i = 0; i < nb; i++) begin
      @(negedge clk); rxd = f[i]; repeat (cpb - 1) @(negedge clk);
    end
    @(negedge clk); rxd = 1; repeat (3 * cpb) @(negedge clk);
  endtask

  task automatic expect_frame(input int n0, input logic [7:0] b, input bit pe, input bit fe, input string what);
    check(nvalid == n0 + 1, {what, ": one frame"});
    check(last_data == b, $sformatf("%s: data %h expected %h", what, last_data, b));
    check(last_perr == pe && last_ferr == fe, {what, ": error flags"});
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] b; int n0;
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    repeat (20) @(negedge clk);
    for (int k = 0; k < 4; k++) begin b = 8'($urandom); n0 = nvalid; send(b, 16, 0, 0); expect_frame(n0, b, 0, 0, "8N1"); end
    par_en = 1;
    b = 8'($urandom); n0 = nvalid; send(b, 16, 0, 0); expect_frame(n0, b, 0, 0, "even parity ok");
    b = 8'($urandom); n0 = nvalid; send(b, 16, 1, 0); expect_frame(n0, b, 1, 0, "even parity bad");
    par_odd = 1;
    b = 8'($urandom); n0 = nvalid; send(b, 16, 0, 0); expect_frame(n0, b, 0, 0, "odd parity ok");
    b = 8'($urandom); n0 = nvalid; send(b, 16, 1, 0); expect_frame(n0, b, 1, 0, "odd parity bad");
    // glitch: 4 clocks low
    n0 = nvalid;
    @(negedge clk); rxd = 0; repeat (4) @(negedge clk); rxd = 1; repeat (300) @(negedge clk);
    check(nvalid == n0 && !busy, "glitch rejected");
    b = 8'($urandom); n0 = nvalid; send(b, 16, 0, 1); expect_frame(n0, b, 0, 1, "framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
