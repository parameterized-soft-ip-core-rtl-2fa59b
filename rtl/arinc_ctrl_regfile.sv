// Register file of the ARINC controller.
// It holds the registers the control unit works with:
//  * PC, the program counter, which addresses the ROM
//  * SP, the stack pointer, which addresses the stack RAM
//  * IR, the first byte of the instruction being executed
//  * the carry flag
// All are plain registers cleared by reset. The control unit drives them with
// per-clock commands:
//  * PC: hold, increment, or load pc_d (a jump target or a return address)
//  * SP: hold, push (increment) or pop (decrement)
//  * IR and carry: write enables
// Every change shows on the outputs from the next clock.
// A register file that holds PC and SP, feeding the ROM and the RAM, follows
// the design. The exact register set and the command encoding are this
// design's own.
module arinc_ctrl_regfile
  import arinc_ctrl_pkg::*;
#(
  parameter int unsigned PC_W = 7,
  parameter int unsigned SP_W = 5
) (
  input  logic            clk,
  input  logic            rst,
  input  pc_op_e          pc_op,
  input  logic [PC_W-1:0] pc_d,
  input  sp_op_e          sp_op,
  input  logic            ir_we,
  input  logic [7:0]      ir_d,
  input  logic            cry_we,
  input  logic            cry_d,
  output logic [PC_W-1:0] pc,
  output logic [SP_W-1:0] sp,
  output logic [7:0]      ir,
  output logic            carry
);
  always_ff @(posedge clk) begin
    if (rst) begin
      pc    <= '0;
      sp    <= '0;
      ir    <= '0;
      carry <= 1'b0;
    end else begin
      unique case (pc_op)
        PC_INC:  pc <= pc + 1'b1;
        PC_LOAD: pc <= pc_d;
        default: ;
      endcase
      unique case (sp_op)
        SP_PUSH: sp <= sp + 1'b1;
        SP_POP:  sp <= sp - 1'b1;
        default: ;
      endcase
      if (ir_we)  ir    <= ir_d;
      if (cry_we) carry <= cry_d;
    end
  end
endmodule
