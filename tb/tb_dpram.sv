// Testbench for dpram: writes random words to random addresses, keeps a
// reference array and checks combinational reads, including a read of the
// address being written in the same clock (old data until the edge).
module tb_dpram;
  localparam int W = 18, D = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we; logic [3:0] wa, ra; logic [W-1:0] wd, rd;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  dpram #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .we(we), .wr_addr(wa), .wr_data(wd), .rd_addr(ra), .rd_data(rd));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); we = 1; wa = 4'(i); wd = W'($urandom); ref_mem[i] = wd;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 4'($urandom); wd = W'($urandom); ra = 4'($urandom);
      #1 check(rd == ref_mem[ra], $sformatf("read addr %0d", ra));
      @(posedge clk); if (we) ref_mem[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
