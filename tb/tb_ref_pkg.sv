// tb_ref_pkg: reference model of the processor's 14 instructions, written
// with the language's own arithmetic operators so that testbenches can check
// the structural Vedic multiplier and MUX-based adders against it.
package tb_ref_pkg;
  import risc_pkg::*;

  // Expected 128-bit result of op on 64-bit r1, r2 with accumulator acc.
  function automatic logic [127:0] alu_ref(input opcode_e op, input logic [63:0] r1,
                                           input logic [63:0] r2, input logic [127:0] acc);
    logic [127:0] x, y;
    x = {64'd0, r1};
    y = {64'd0, r2};
    case (op)
      OP_ADD:  return x + y;
      OP_SUB:  return x - y;
      OP_MUL:  return x * y;
      OP_DIV:  return (r2 == 64'd0) ? {64'd0, {64{1'b1}}} : x / y;
      OP_MAC:  return acc + x * y;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_XOR:  return x ^ y;
      OP_NOT:  return {64'd0, ~r1};
      OP_SHL:  return x << 1;
      OP_SHR:  return x >> 1;
      OP_INC:  return x + 128'd1;
      OP_DEC:  return x - 128'd1;
      OP_CMP:  return (r1 > r2) ? 128'd1 : 128'd0;
      default: return acc;
    endcase
  endfunction

  function automatic logic [63:0] rand64();
    return {$urandom(), $urandom()};
  endfunction

endpackage
