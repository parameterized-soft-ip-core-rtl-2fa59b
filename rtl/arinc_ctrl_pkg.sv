// Instruction set of the one-bit ARINC controller.
// Ten instructions. Byte 0 holds the opcode in bits 7:4 and a bit number in
// bits 3:0. Jumps have a second byte: bit 7 extends the bit number for Jb/Jnb,
// bits 6:0 are the target address. Bit numbers 0-15 are the output port,
// 16-23 the input port and 24 the carry flag. The encoding is this design's own;
// the instruction list is the design's.
package arinc_ctrl_pkg;
  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,
    OP_CLRC = 4'h1,
    OP_SETC = 4'h2,
    OP_RET  = 4'h3,
    OP_CLRB = 4'h4,
    OP_SETB = 4'h5,
    OP_JMP  = 4'h6,
    OP_JSR  = 4'h7,
    OP_JNB  = 4'h8,
    OP_JB   = 4'h9
  } opcode_e;

  // Register-file commands issued by the control unit.
  typedef enum logic [1:0] {PC_HOLD, PC_INC, PC_LOAD} pc_op_e;
  typedef enum logic [1:0] {SP_HOLD, SP_PUSH, SP_POP} sp_op_e;

  localparam int BIT_IN0  = 16;   // first input-port bit
  localparam int BIT_CRY  = 24;   // carry flag

  // Two-byte instructions take a second fetch clock.
  function automatic logic is_long(logic [3:0] op);
    return op inside {OP_JMP, OP_JSR, OP_JNB, OP_JB};
  endfunction

  // Encoders used to build ROM images, returned as {byte0, byte1}; the length
  // of the instruction decides whether byte1 is placed.
  function automatic logic [15:0] i1(opcode_e op, int b = 0);
    return {op, 4'(b), 8'h00};
  endfunction
  function automatic logic [15:0] i2(opcode_e op, int b, int addr);
    return {op, 4'(b), 1'(b >> 4), 7'(addr)};
  endfunction

  // Places an instruction at address pc of a packed ROM image (byte i at bits
  // 8*i+7:8*i) and returns the new image.
  function automatic logic [1023:0] put(logic [1023:0] img, int pc, logic [15:0] ins);
    img[8*pc +: 8] = ins[15:8];
    if (is_long(ins[15:12])) img[8*(pc+1) +: 8] = ins[7:0];
    return img;
  endfunction
endpackage
