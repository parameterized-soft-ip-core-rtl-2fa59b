// One-bit RISC controller of the ARINC module.
// Executes the ten-instruction set of arinc_ctrl_pkg from a ROM of ROM_BYTES
// bytes, with a STACK_DEPTH-entry return stack and bit-addressable ports.
// Instructions take as many clocks as they need: one-byte instructions (Nop,
// Clr/Set carry, Ret, Clr/Set bit) finish in the clock they are fetched, jumps
// and Jsr fetch their address byte in a second clock. The control unit is a
// two-state Mealy machine (FETCH, OPERAND) whose outputs depend on the state and
// on the ROM byte being read. The register file holds PC, SP, the latched first
// instruction byte and the carry flag. This module wires together the five
// parts: control unit, register file, ROM, stack RAM and ports.
// Timing: a bit set by Set b is visible on out_port from the next clock, so a
// Set b / Clr b pair makes a one-clock strobe. Input pins are sampled one clock
// before a Jb/Jnb can see them.
// Instruction set, ROM/RAM sizes, port widths and the Mealy control unit follow
// the design; the encoding and cycle counts are this design's own.
module arinc_ctrl
  import arinc_ctrl_pkg::*;
#(
  parameter int unsigned ROM_BYTES   = 128,
  parameter int unsigned STACK_DEPTH = 32,
  parameter int unsigned IN_W        = 8,
  parameter int unsigned OUT_W       = 16,
  parameter logic [8*ROM_BYTES-1:0] IMAGE = arinc_fw_pkg::FW_IMAGE,
  localparam int unsigned PC_W = $clog2(ROM_BYTES),
  localparam int unsigned SP_W = $clog2(STACK_DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  in_port,
  output logic [OUT_W-1:0] out_port,
  output logic [PC_W-1:0]  pc_o,       // for observation
  output logic             instr_done  // one clock per retired instruction
);
  pc_op_e          pc_op;
  sp_op_e          sp_op;
  logic [PC_W-1:0] pc, pc_d;
  logic [SP_W-1:0] sp;
  logic [7:0]      ir, rom_q;
  logic            carry, ir_we, cry_we, cry_d;
  logic [PC_W-1:0] stack_q;
  logic [IN_W-1:0] in_q;
  logic            stack_we, bit_we, bit_val;
  logic            operand;

  arinc_ctrl_cu #(.PC_W(PC_W), .IN_W(IN_W), .OUT_W(OUT_W)) u_cu (
    .clk(clk), .rst(rst), .rom_q(rom_q), .ir(ir), .stack_q(stack_q),
    .out_q(out_port), .in_q(in_q), .carry(carry),
    .pc_op(pc_op), .pc_d(pc_d), .sp_op(sp_op), .ir_we(ir_we),
    .cry_we(cry_we), .cry_d(cry_d), .stack_we(stack_we),
    .bit_we(bit_we), .bit_val(bit_val), .operand(operand), .instr_done(instr_done));

  arinc_ctrl_regfile #(.PC_W(PC_W), .SP_W(SP_W)) u_regs (
    .clk(clk), .rst(rst), .pc_op(pc_op), .pc_d(pc_d), .sp_op(sp_op),
    .ir_we(ir_we), .ir_d(rom_q), .cry_we(cry_we), .cry_d(cry_d),
    .pc(pc), .sp(sp), .ir(ir), .carry(carry));

  arinc_ctrl_rom #(.ROM_BYTES(ROM_BYTES), .IMAGE(IMAGE)) u_rom (.addr(pc), .data(rom_q));

  // Jsr pushes the address after its operand byte; Ret reads the top entry
  arinc_ctrl_stack #(.DEPTH(STACK_DEPTH), .WIDTH(PC_W)) u_stack (
    .clk(clk), .we(stack_we), .waddr(sp), .wdata(pc + 1'b1),
    .raddr(sp - 1'b1), .rdata(stack_q));

  arinc_ctrl_ports #(.IN_W(IN_W), .OUT_W(OUT_W)) u_ports (
    .clk(clk), .rst(rst), .in_pins(in_port), .in_q(in_q),
    .bit_we(bit_we), .bit_sel(rom_q[$clog2(OUT_W)-1:0]), .bit_val(bit_val), .out_q(out_port));

  assign pc_o = pc;
endmodule
