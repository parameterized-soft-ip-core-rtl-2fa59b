// Testbench for uart_regs: reset values (baud B1, frame size 8), writing and
// reading back each register, the status and error read paths, FIFO push/pop
// decoding, chip-select gating and the one-clock error reset pulse that is not
// stored in the command register.
module tb_uart_regs;
  import uart_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic sel = 0, rd = 0, wr = 0; logic [1:0] addr = 0; logic [7:0] wdata = 0, rdata, rx_head = 8'hA5;
  logic tx_push, rx_pop, err_reset; uart_cmd_t cmd; logic [7:0] baud; logic [4:0] frame;
  uart_status_t status = 8'h2B; logic [2:0] errors = 3'b101;
  int checks = 0, failures = 0, pushes = 0, pops = 0, err_pulses = 0;

  uart_regs dut (.clk(clk), .rst(rst), .sel(sel), .rd(rd), .wr(wr), .addr(addr), .wdata(wdata), .rdata(rdata),
    .tx_push(tx_push), .rx_pop(rx_pop), .rx_head(rx_head), .cmd_q(cmd), .err_reset(err_reset), .baud_q(baud),
    .frame_q(frame), .status(status), .errors(errors));

  always @(posedge clk) begin pushes += int'(tx_push); pops += int'(rx_pop); err_pulses += int'(err_reset); end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic bw(input logic [1:0] a, input logic [7:0] d, input bit s = 1);
    @(negedge clk); sel = s; wr = 1; addr = a; wdata = d; @(negedge clk); sel = 0; wr = 0;
  endtask
  task automatic br(input logic [1:0] a, output logic [7:0] d);
    @(negedge clk); sel = 1; rd = 1; addr = a; #1 d = rdata; @(negedge clk); sel = 0; rd = 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] d;
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    check(baud == 8'h01 && frame == 5'd8 && cmd == '0, "reset values");
    br(U_FRAME, d); check(d == 8'd8, "frame size reads 8");
    bw(U_FRAME, 8'd13); br(U_FRAME, d); check(d == 8'd13 && frame == 5'd13, "frame size written");
    bw(U_BAUD, 8'h20); check(baud == 8'h20, "baud written");
    bw(U_CMD, 8'h1F); check(cmd == 8'h0F, "command stored without error reset bit");
    check(err_pulses == 1, "one error reset pulse");
    br(U_CMD, d); check(d == 8'h2B, "status read");
    br(U_BAUD, d); check(d == 8'h05, "error flags read");
    br(U_DATA, d); check(d == 8'hA5 && pops == 1, "data read pops the receive FIFO");
    bw(U_DATA, 8'h3C); check(pushes == 1, "data write pushes the transmit FIFO");
    bw(U_BAUD, 8'h80, 0); check(baud == 8'h20 && pushes == 1, "no write without select");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
