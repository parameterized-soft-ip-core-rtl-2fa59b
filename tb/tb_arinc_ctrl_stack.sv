// Testbench for arinc_ctrl_stack: pushes 32 return addresses, pops them back
// in reverse order and checks each against a reference list.
module tb_arinc_ctrl_stack;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0; logic [4:0] wa = 0, ra = 0; logic [6:0] wd = 0, rd;
  logic [6:0] ref_val [32];
  int checks = 0, failures = 0;

  arinc_ctrl_stack dut (.clk(clk), .we(we), .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; wa = 5'(i); wd = 7'($urandom); ref_val[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 31; i >= 0; i--) begin
      @(negedge clk); ra = 5'(i); #1;
      checks++; if (rd != ref_val[i]) begin failures++; $display("FAIL entry %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
