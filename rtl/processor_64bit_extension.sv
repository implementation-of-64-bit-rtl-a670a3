// processor_64bit_extension: 64-bit RISC processor with a Vedic ALU/MAC.
//
// Every instruction takes two clock cycles, set by the control unit:
//   FETCH   : the instruction register stores the opcode on prst_addr and
//             the current PC; the register file loads a into R1 and b into
//             R2; the result of the previous instruction goes out on
//             databus (with its Z flag), its address on addressbus.
//   EXECUTE : the ALU computes op(R1, R2) into its accumulator aluout; the
//             MAR takes the instruction's address; the PC advances.
// So the result of the instruction fetched in cycle 2k appears on databus
// from cycle 2k+3 on, with wr high in that cycle and addressbus holding the
// instruction's address (the PC value at its fetch). Operands and opcode
// must be steady at the clock edge that ends the FETCH phase. The 14
// instructions are listed in risc_pkg. rst is synchronous and active high.
//
// The block set and the instance names v0..v6, the 64-bit operands, the
// 4-bit prst_addr and addressbus and the 128-bit databus follow the design;
// the two-phase timing, the use of prst_addr as the opcode and the extra
// outputs wr and zflag are this design's own.
module processor_64bit_extension
  import risc_pkg::*;
#(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned AW    = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic [3:0]         prst_addr,
  output logic [AW-1:0]      addressbus,
  output logic [2*WIDTH-1:0] databus,
  output logic               wr,
  output logic               zflag
);

  logic               fetch, execute;
  opcode_e            op;
  logic [AW-1:0]      ir_addr, pc, mar, bus_addr;
  logic [WIDTH-1:0]   r1, r2;
  logic [2*WIDTH-1:0] aluout;
  logic               alu_zero, alu_valid;

  controlunit v0 (.clk, .rst, .fetch, .execute);

  instructionregister #(.AW(AW)) v1 (
    .clk, .rst, .load(fetch), .instr(prst_addr), .pc, .op, .addr(ir_addr)
  );

  registerfile #(.WIDTH(WIDTH), .AW(AW)) v2 (
    .clk, .rst, .load_ops(fetch), .a, .b,
    .wb(fetch & alu_valid), .result(aluout), .result_z(alu_zero),
    .addr_in(bus_addr), .r1, .r2, .addressbus, .databus, .zflag, .wr
  );

  programCounter #(.AW(AW)) v3 (.clk, .rst, .inc(execute), .pc);

  memoryaddressR #(.AW(AW)) v4 (.clk, .rst, .load(execute), .d(ir_addr), .mar);

  multiplexer #(.AW(AW)) v5 (.sel(fetch), .pc, .mar, .y(bus_addr));

  ALU #(.WIDTH(WIDTH)) v6 (
    .clk, .rst, .en(execute), .op, .r1, .r2,
    .aluout, .zero(alu_zero), .valid(alu_valid)
  );

endmodule
