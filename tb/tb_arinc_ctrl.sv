// Testbench for arinc_ctrl: runs a test program that uses all ten instructions
// (carry set/clear and test, bit set/clear on the output port, taken and not
// taken Jb/Jnb on output, input and carry bits, Jmp, nested Jsr/Ret) and checks
// the final output port, that skipped code never ran, and the cycle count:
// one clock for one-byte instructions, two for two-byte ones (26 clocks and 18
// instructions to reach the final loop).
module tb_arinc_ctrl;
  import arinc_ctrl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] in_port;
  logic [15:0] out_port;
  logic [6:0] pc;
  logic done;
  int checks = 0, failures = 0;

  function automatic logic [1023:0] prog();
    logic [1023:0] m = '0;
    m = put(m, 'h00, i1(OP_SETC));
    m = put(m, 'h01, i2(OP_JB, BIT_CRY, 'h05));
    m = put(m, 'h03, i1(OP_SETB, 15));
    m = put(m, 'h05, i1(OP_CLRC));
    m = put(m, 'h06, i2(OP_JB, BIT_CRY, 'h03));
    m = put(m, 'h08, i2(OP_JNB, BIT_CRY, 'h0C));
    m = put(m, 'h0A, i1(OP_SETB, 14));
    m = put(m, 'h0C, i2(OP_JSR, 0, 'h30));
    m = put(m, 'h0E, i1(OP_SETB, 1));
    m = put(m, 'h0F, i2(OP_JNB, BIT_IN0 + 3, 'h0F));
    m = put(m, 'h11, i1(OP_SETB, 2));
    m = put(m, 'h12, i2(OP_JB, BIT_IN0 + 5, 'h16));
    m = put(m, 'h14, i1(OP_SETB, 3));
    m = put(m, 'h15, i1(OP_NOP));
    m = put(m, 'h16, i2(OP_JMP, 0, 'h16));
    m = put(m, 'h30, i1(OP_SETB, 0));
    m = put(m, 'h31, i2(OP_JSR, 0, 'h40));
    m = put(m, 'h33, i1(OP_RET));
    m = put(m, 'h40, i2(OP_JB, 0, 'h44));
    m = put(m, 'h42, i1(OP_SETB, 13));
    m = put(m, 'h44, i1(OP_CLRB, 0));
    m = put(m, 'h45, i1(OP_RET));
    return m;
  endfunction

  arinc_ctrl #(.IMAGE(prog())) dut (.clk(clk), .rst(rst), .in_port(in_port), .out_port(out_port),
    .pc_o(pc), .instr_done(done));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int clks = 0, instrs = 0;
    bit saw_bit0 = 0;
    in_port = 8'h08;   // input bit 3 high, bit 5 low
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (pc != 7'h16 && clks < 100) begin
      @(posedge clk); clks++;
      #1 if (done) instrs++;
      if (out_port[0]) saw_bit0 = 1;
    end
    check(clks == 26, $sformatf("clocks to final loop: %0d, expected 26", clks));
    check(instrs == 18, $sformatf("instructions retired: %0d, expected 18", instrs));
    check(saw_bit0, "subroutine set bit 0");
    repeat (4) @(posedge clk);
    check(out_port == 16'h000E, $sformatf("output port %h, expected 000e", out_port));
    check(pc inside {7'h16, 7'h17}, "stays in final loop");
    // with input bit 3 low the program waits at 0x0F
    rst = 1; in_port = 8'h00; repeat (2) @(posedge clk); @(negedge clk) rst = 0;
    repeat (40) @(posedge clk);
    check(pc inside {7'h0F, 7'h10}, $sformatf("waits on input bit, pc=%h", pc));
    check(out_port == 16'h0002, $sformatf("output port while waiting %h", out_port));
    in_port = 8'h08; repeat (20) @(posedge clk);
    check(pc inside {7'h16, 7'h17} && out_port == 16'h000E, "continues when input rises");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
