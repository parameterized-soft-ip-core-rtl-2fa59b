// Testbench for arinc_ctrl_ports: random single-bit set/clear operations on the
// output register against a model, and the one-clock delay of the input port.
module tb_arinc_ctrl_ports;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] pins = 0, in_q; logic we = 0; logic [3:0] sel = 0; logic val = 0; logic [15:0] q;
  logic [15:0] model = 0; logic [7:0] pins_d = 0;
  int checks = 0, failures = 0;

  arinc_ctrl_ports dut (.clk(clk), .rst(rst), .in_pins(pins), .in_q(in_q), .bit_we(we), .bit_sel(sel),
    .bit_val(val), .out_q(q));

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      checks++; if (q != model || in_q != pins_d) begin failures++; $display("FAIL step %0d q=%h model=%h", n, q, model); end
      we = $urandom_range(0, 1); sel = 4'($urandom); val = $urandom_range(0, 1); pins = 8'($urandom);
      @(posedge clk); if (we) model[sel] = val; pins_d = pins;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
