// multiplexer: address multiplexer in front of the shared address bus.
//
// The processor has one address bus for instructions and data (von Neumann
// style). This 2:1 multiplexer puts the program counter on it (sel = 0, the
// EXECUTE phase: the address of the instruction being executed) or the
// memory address register (sel = 1, the FETCH phase, when the previous
// result is written back). Combinational. The design only names this block;
// its inputs and select are this design's reading.
module multiplexer #(
  parameter int unsigned AW = 4
) (
  input  logic          sel,
  input  logic [AW-1:0] pc,
  input  logic [AW-1:0] mar,
  output logic [AW-1:0] y
);

  always_comb y = sel ? mar : pc;

endmodule
