// risc_pkg: opcodes shared by the 64-bit Vedic RISC processor.
//
// The processor executes 14 instructions, all register-to-register on the two
// 64-bit operands R1 and R2 (or on R1 alone) with a 128-bit result. Which 14
// operations they are and how they are encoded is this design's own choice:
// codes 0..13 are the instructions, 14 and 15 are no-ops that write nothing
// back.
package risc_pkg;

  typedef enum logic [3:0] {
    OP_ADD  = 4'd0,   // R1 + R2, carry in bit 64
    OP_SUB  = 4'd1,   // R1 - R2, sign-extended to 128 bits
    OP_MUL  = 4'd2,   // R1 * R2, Vedic multiplier, 128-bit product
    OP_DIV  = 4'd3,   // R1 / R2 (unsigned quotient), all ones when R2 == 0
    OP_MAC  = 4'd4,   // accumulator + R1 * R2
    OP_AND  = 4'd5,
    OP_OR   = 4'd6,
    OP_XOR  = 4'd7,
    OP_NOT  = 4'd8,   // ~R1
    OP_SHL  = 4'd9,   // R1 << 1, the bit shifted out lands in bit 64
    OP_SHR  = 4'd10,  // R1 >> 1
    OP_INC  = 4'd11,  // R1 + 1
    OP_DEC  = 4'd12,  // R1 - 1, sign-extended
    OP_CMP  = 4'd13,  // 1 if R1 > R2 (unsigned), else 0
    OP_NOP0 = 4'd14,
    OP_NOP1 = 4'd15
  } opcode_e;

  // True for the codes that produce a result to write back.
  function automatic logic op_writes(input opcode_e op);
    return !(op == OP_NOP0 || op == OP_NOP1);
  endfunction

endpackage
