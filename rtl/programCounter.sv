// programCounter: AW-bit program counter.
//
// Counts instructions: on a clock edge with inc high (the end of each
// EXECUTE phase) it moves to the next address, wrapping from 2^AW-1 to 0.
// Synchronous active-high reset sets it to 0. There are no jumps; the design
// names none. Width follows the design's 4-bit address bus.
module programCounter #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          inc,
  output logic [AW-1:0] pc
);

  always_ff @(posedge clk) begin
    if (rst)      pc <= '0;
    else if (inc) pc <= pc + 1'b1;
  end

endmodule
