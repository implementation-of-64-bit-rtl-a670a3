// instructionregister: 8-bit instruction register.
//
// In a cycle with load high (the FETCH phase) it stores the 4-bit opcode
// presented on instr together with the current program counter, which
// becomes the address the instruction's result is written to. op and addr
// are the two fields of the stored word {op, addr}; they change one clock
// edge after load. Reset clears it to a no-op. The 8-bit width follows the
// design; the format is this design's own choice.
module instructionregister
  import risc_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [3:0]    instr,
  input  logic [AW-1:0] pc,
  output opcode_e       op,
  output logic [AW-1:0] addr
);

  logic [3+AW:0] ir;  // {opcode, address}

  always_ff @(posedge clk) begin
    if (rst)       ir <= {OP_NOP1, {AW{1'b0}}};
    else if (load) ir <= {instr, pc};
  end

  assign op   = opcode_e'(ir[3+AW:AW]);
  assign addr = ir[AW-1:0];

endmodule
