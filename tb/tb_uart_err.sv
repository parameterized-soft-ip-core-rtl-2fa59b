// Testbench for uart_err: each error flag is set only by a completed frame with
// that error (or, for overrun, a frame arriving while the FIFO is full), stays
// set over later good frames, and is cleared by the error reset.
module tb_uart_err;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic v = 0, pe = 0, fe = 0, full = 0, er = 0, p, f, o;
  int checks = 0, failures = 0;

  uart_err dut (.clk(clk), .rst(rst), .frame_valid(v), .frame_par_err(pe), .frame_frm_err(fe),
    .fifo_full(full), .err_reset(er), .parity_err(p), .framing_err(f), .overrun_err(o));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic frame(input bit ip, input bit ifr, input bit ifull);
    @(negedge clk); v = 1; pe = ip; fe = ifr; full = ifull;
    @(negedge clk); v = 0; pe = 0; fe = 0; full = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    check({p, f, o} == 3'b000, "clear after reset");
    @(negedge clk); pe = 1; fe = 1; full = 1; @(negedge clk); pe = 0; fe = 0; full = 0;
    check({p, f, o} == 3'b000, "no frame, no error");
    frame(1, 0, 0); check({p, f, o} == 3'b100, "parity");
    frame(0, 0, 0); check({p, f, o} == 3'b100, "sticky");
    frame(0, 1, 0); check({p, f, o} == 3'b110, "framing");
    frame(0, 0, 1); check({p, f, o} == 3'b111, "overrun");
    @(negedge clk); er = 1; @(negedge clk); er = 0;
    check({p, f, o} == 3'b000, "error reset");
    frame(0, 0, 1); check({p, f, o} == 3'b001, "overrun alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
