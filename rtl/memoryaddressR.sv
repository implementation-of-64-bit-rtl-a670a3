// memoryaddressR: memory address register (address buffer).
//
// Holds the address the current result goes to. It loads d (the
// instruction register's address field) on a clock edge with load high, in
// the EXECUTE phase, so the address is still there at write-back while the
// PC has moved on. Synchronous active-high reset clears it. AW follows the
// design's 4-bit address bus; when it loads is this design's choice.
module memoryaddressR #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [AW-1:0] d,
  output logic [AW-1:0] mar
);

  always_ff @(posedge clk) begin
    if (rst)       mar <= '0;
    else if (load) mar <= d;
  end

endmodule
