// Control unit of the ARINC controller: a two-state Mealy machine.
// In FETCH it decodes the ROM byte at PC:
//  * A one-byte instruction (Nop, Clr/Set carry, Ret, Clr/Set bit) executes in
//    that same clock.
//  * A jump latches the byte into IR and moves to OPERAND.
// In OPERAND the ROM shows the address byte:
//  * Jmp loads the target into PC.
//  * Jsr loads the target and pushes the return address.
//  * Jb/Jnb test the addressed bit and either jump or step on.
// Outputs depend on the state and on the ROM byte of the current clock, which
// is what makes the machine Mealy. They are commands to the register file,
// the stack write enable and the port bit write. The addressed bit can be any
// of three sources:
//  * an output-port bit (0-15)
//  * a registered input-port bit (16-23)
//  * the carry (24)
// instr_done pulses for one clock after each retired instruction.
// The Mealy control unit and its multi-cycle execution follow the design. The
// two states, the encoding and the cycle counts are this design's own.
module arinc_ctrl_cu
  import arinc_ctrl_pkg::*;
#(
  parameter int unsigned PC_W  = 7,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [7:0]       rom_q,      // ROM byte at PC
  input  logic [7:0]       ir,         // first byte of a two-byte instruction
  input  logic [PC_W-1:0]  stack_q,    // return address on top of the stack
  input  logic [OUT_W-1:0] out_q,
  input  logic [IN_W-1:0]  in_q,
  input  logic             carry,
  output pc_op_e           pc_op,
  output logic [PC_W-1:0]  pc_d,
  output sp_op_e           sp_op,
  output logic             ir_we,
  output logic             cry_we,
  output logic             cry_d,
  output logic             stack_we,
  output logic             bit_we,
  output logic             bit_val,
  output logic             operand,    // in the second clock of a jump
  output logic             instr_done
);
  typedef enum logic {S_FETCH, S_OPERAND} state_e;

  state_e          state;
  logic [3:0]      op_f, op;
  logic [4:0]      bit_addr;
  logic            bit_test;
  logic [PC_W-1:0] target;

  assign op_f     = rom_q[7:4];
  assign op       = ir[7:4];
  assign bit_addr = {rom_q[7], ir[3:0]};
  assign target   = rom_q[PC_W-1:0];
  assign operand  = (state == S_OPERAND);

  always_comb begin
    if (bit_addr < 5'(OUT_W))                         bit_test = out_q[bit_addr[$clog2(OUT_W)-1:0]];
    else if (bit_addr >= 5'(BIT_IN0) && bit_addr < 5'(BIT_IN0 + IN_W))
                                                      bit_test = in_q[3'(bit_addr - 5'(BIT_IN0))];
    else if (bit_addr == 5'(BIT_CRY))                 bit_test = carry;
    else                                              bit_test = 1'b0;
  end

  // Mealy outputs
  always_comb begin
    pc_op    = PC_INC;
    pc_d     = target;
    sp_op    = SP_HOLD;
    ir_we    = 1'b0;
    cry_we   = 1'b0;
    cry_d    = 1'b0;
    stack_we = 1'b0;
    bit_we   = 1'b0;
    bit_val  = 1'b0;
    if (state == S_FETCH) begin
      ir_we   = 1'b1;
      bit_we  = (op_f == OP_SETB) || (op_f == OP_CLRB);
      bit_val = (op_f == OP_SETB);
      cry_we  = (op_f == OP_CLRC) || (op_f == OP_SETC);
      cry_d   = (op_f == OP_SETC);
      if (op_f == OP_RET) begin
        pc_op = PC_LOAD;
        pc_d  = stack_q;
        sp_op = SP_POP;
      end
    end else begin
      unique case (op)
        OP_JMP: pc_op = PC_LOAD;
        OP_JSR: begin pc_op = PC_LOAD; sp_op = SP_PUSH; stack_we = 1'b1; end
        OP_JB:  pc_op = bit_test  ? PC_LOAD : PC_INC;
        OP_JNB: pc_op = !bit_test ? PC_LOAD : PC_INC;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_FETCH;
      instr_done <= 1'b0;
    end else if (state == S_FETCH) begin
      state      <= is_long(op_f) ? S_OPERAND : S_FETCH;
      instr_done <= !is_long(op_f);
    end else begin
      state      <= S_FETCH;
      instr_done <= 1'b1;
    end
  end
endmodule
