// Testbench for arinc_ctrl_cu, the controller's Mealy control unit.
// The ROM byte, IR byte, stack top, ports and carry are driven with random
// values. Every clock the unit's outputs are compared with a reference decoder
// written as a table per opcode; the reference also tracks the FETCH/OPERAND
// state (a jump opcode in FETCH leads to one OPERAND clock) and the one-clock
// instr_done pulse after each retired instruction. Each opcode and both jump
// outcomes are counted, and one that never occurred is a failure.
module tb_arinc_ctrl_cu;
  import arinc_ctrl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] rom_q = 0, ir = 0; logic [6:0] stack_q = 0; logic [15:0] out_q = 0;
  logic [7:0] in_q = 0; logic carry = 0;
  pc_op_e pc_op; sp_op_e sp_op; logic [6:0] pc_d;
  logic ir_we, cry_we, cry_d, stack_we, bit_we, bit_val, operand, instr_done;
  int checks = 0, failures = 0;
  int seen [16], jumps_taken = 0, jumps_not = 0;

  arinc_ctrl_cu dut (.clk(clk), .rst(rst), .rom_q(rom_q), .ir(ir), .stack_q(stack_q),
    .out_q(out_q), .in_q(in_q), .carry(carry), .pc_op(pc_op), .pc_d(pc_d), .sp_op(sp_op),
    .ir_we(ir_we), .cry_we(cry_we), .cry_d(cry_d), .stack_we(stack_we), .bit_we(bit_we),
    .bit_val(bit_val), .operand(operand), .instr_done(instr_done));

  // reference: the value of bit n of the bit space (0-15 out, 16-23 in, 24 carry)
  function automatic bit bit_of(int n);
    if (n < 16) return out_q[n];
    if (n < 24) return in_q[n - 16];
    if (n == 24) return carry;
    return 0;
  endfunction

  initial begin
    repeat (50_000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit m_operand = 0, m_done = 1;
    repeat (2) @(negedge clk);
    rst = 0;     // the first clock fetches rom_q = 0, a Nop, so instr_done follows
    for (int i = 0; i < 20_000; i++) begin
      int op_fetch, op_ir, bitn;
      bit long_op, taken;
      pc_op_e e_pc; sp_op_e e_sp; bit [6:0] e_pcd;
      bit e_irwe, e_crywe, e_cryd, e_stk, e_bwe, e_bval;
      @(negedge clk);
      // in OPERAND the IR holds what FETCH latched; keep that relation
      if (!m_operand) ir = 8'($urandom);
      rom_q   = 8'($urandom);
      if ($urandom_range(0, 3) == 0) rom_q[7:4] = 4'($urandom_range(6, 9));  // more jumps
      stack_q = 7'($urandom);
      out_q   = 16'($urandom);
      in_q    = 8'($urandom);
      carry   = 1'($urandom);
      #1;
      op_fetch = int'(rom_q[7:4]);
      op_ir    = int'(ir[7:4]);
      bitn     = int'({rom_q[7], ir[3:0]});
      e_pc = PC_INC; e_pcd = rom_q[6:0]; e_sp = SP_HOLD;
      e_irwe = 0; e_crywe = 0; e_cryd = 0; e_stk = 0; e_bwe = 0; e_bval = 0;
      if (!m_operand) begin
        seen[op_fetch]++;
        e_irwe = 1;
        case (op_fetch)
          1: begin e_crywe = 1; e_cryd = 0; end                 // Clr Cry
          2: begin e_crywe = 1; e_cryd = 1; end                 // Set Cry
          3: begin e_pc = PC_LOAD; e_pcd = stack_q; e_sp = SP_POP; end  // Ret
          4: begin e_bwe = 1; e_bval = 0; end                   // Clr b
          5: begin e_bwe = 1; e_bval = 1; end                   // Set b
          default: ;
        endcase
        long_op = op_fetch inside {[6:9]};
      end else begin
        long_op = 0;
        case (op_ir)
          6: e_pc = PC_LOAD;                                    // Jmp
          7: begin e_pc = PC_LOAD; e_sp = SP_PUSH; e_stk = 1; end  // Jsr
          8, 9: begin                                           // Jnb, Jb
            taken = (op_ir == 9) ? bit_of(bitn) : !bit_of(bitn);
            if (taken) jumps_taken++; else jumps_not++;
            e_pc = taken ? PC_LOAD : PC_INC;
          end
          default: ;
        endcase
      end
      checks++;
      if (pc_op != e_pc || (e_pc == PC_LOAD && pc_d != e_pcd) || sp_op != e_sp ||
          ir_we != e_irwe || cry_we != e_crywe || (e_crywe && cry_d != e_cryd) ||
          stack_we != e_stk || bit_we != e_bwe || (e_bwe && bit_val != e_bval) ||
          operand != m_operand || instr_done != m_done) begin
        failures++;
        if (failures < 10)
          $display("FAIL step %0d: rom %h ir %h operand %0d: pc_op %0d/%0d pc_d %h/%h sp %0d/%0d stk %0d/%0d bit %0d%0d/%0d%0d cry %0d%0d/%0d%0d done %0d/%0d",
                   i, rom_q, ir, m_operand, pc_op, e_pc, pc_d, e_pcd, sp_op, e_sp, stack_we, e_stk,
                   bit_we, bit_val, e_bwe, e_bval, cry_we, cry_d, e_crywe, e_cryd, instr_done, m_done);
      end
      // FETCH of a one-byte instruction and every OPERAND clock retire one
      m_done = m_operand || !long_op;
      if (!m_operand && long_op) ir = rom_q;   // what the register file would latch
      m_operand = !m_operand && long_op;
    end
    for (int op = 0; op <= 9; op++) begin
      checks++;
      if (seen[op] == 0) begin failures++; $display("FAIL opcode %0d never fetched", op); end
    end
    checks++;
    if (jumps_taken == 0 || jumps_not == 0) begin failures++; $display("FAIL conditional jump outcomes"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
