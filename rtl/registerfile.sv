// registerfile: operand and storage registers of the processor.
//
// R1 and R2 load the operands a and b on a clock edge with load_ops high
// (FETCH) and feed the ALU. On the output side it holds the bus registers:
// addressbus loads addr_in every cycle, while databus and zflag load the ALU
// result and its Z flag only on an edge with wb high (write-back). wr is
// high for the cycle after such an edge, marking a new word on databus.
// Synchronous active-high reset clears everything. The design names R1 and
// describes a register bank, a storage register for the result and a Z
// flag; the register count it reports (about 400) is that of these
// registers, not of a multi-word bank. Names other than R1 are this design's.
module registerfile #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned AW    = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               load_ops,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               wb,
  input  logic [2*WIDTH-1:0] result,
  input  logic               result_z,
  input  logic [AW-1:0]      addr_in,
  output logic [WIDTH-1:0]   r1,
  output logic [WIDTH-1:0]   r2,
  output logic [AW-1:0]      addressbus,
  output logic [2*WIDTH-1:0] databus,
  output logic               zflag,
  output logic               wr
);

  logic [WIDTH-1:0] R1, R2;

  always_ff @(posedge clk) begin
    if (rst) begin
      R1         <= '0;
      R2         <= '0;
      addressbus <= '0;
      databus    <= '0;
      zflag      <= 1'b0;
      wr         <= 1'b0;
    end else begin
      if (load_ops) begin
        R1 <= a;
        R2 <= b;
      end
      addressbus <= addr_in;
      wr         <= wb;
      if (wb) begin
        databus <= result;
        zflag   <= result_z;
      end
    end
  end

  assign r1 = R1;
  assign r2 = R2;

endmodule
