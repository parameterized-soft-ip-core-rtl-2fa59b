// Testbench for arinc_ctrl_regfile: 3000 clocks of random commands (PC hold,
// increment or load, SP push or pop, IR and carry writes), then a reset, each
// compared every clock with a reference model kept in plain integers with
// explicit wrap-around (7-bit PC, 5-bit SP).
module tb_arinc_ctrl_regfile;
  import arinc_ctrl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  pc_op_e pc_op = PC_HOLD; sp_op_e sp_op = SP_HOLD;
  logic [6:0] pc_d = 0, pc; logic [4:0] sp; logic [7:0] ir_d = 0, ir;
  logic ir_we = 0, cry_we = 0, cry_d = 0, carry;
  int checks = 0, failures = 0;
  int m_pc = 0, m_sp = 0, m_ir = 0, m_cry = 0;

  arinc_ctrl_regfile dut (.clk(clk), .rst(rst), .pc_op(pc_op), .pc_d(pc_d), .sp_op(sp_op),
    .ir_we(ir_we), .ir_d(ir_d), .cry_we(cry_we), .cry_d(cry_d),
    .pc(pc), .sp(sp), .ir(ir), .carry(carry));

  task automatic compare(string when);
    checks++;
    if (int'(pc) != m_pc || int'(sp) != m_sp || int'(ir) != m_ir || int'(carry) != m_cry) begin
      failures++;
      $display("FAIL %s: pc %0d/%0d sp %0d/%0d ir %h/%h carry %0d/%0d", when,
               pc, m_pc, sp, m_sp, ir, m_ir, carry, m_cry);
    end
  endtask

  initial begin
    repeat (10_000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    compare("after reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      pc_op  = pc_op_e'($urandom_range(0, 2));
      sp_op  = sp_op_e'($urandom_range(0, 2));
      pc_d   = 7'($urandom);
      ir_d   = 8'($urandom);
      ir_we  = 1'($urandom);
      cry_we = 1'($urandom);
      cry_d  = 1'($urandom);
      if (pc_op == PC_INC)  m_pc = (m_pc + 1) % 128;
      if (pc_op == PC_LOAD) m_pc = int'(pc_d);
      if (sp_op == SP_PUSH) m_sp = (m_sp + 1) % 32;
      if (sp_op == SP_POP)  m_sp = (m_sp + 31) % 32;
      if (ir_we)  m_ir  = int'(ir_d);
      if (cry_we) m_cry = int'(cry_d);
      @(negedge clk);
      pc_op = PC_HOLD; sp_op = SP_HOLD; ir_we = 0; cry_we = 0;
      compare($sformatf("step %0d", i));
    end
    rst = 1; @(negedge clk); rst = 0;
    m_pc = 0; m_sp = 0; m_ir = 0; m_cry = 0;
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
