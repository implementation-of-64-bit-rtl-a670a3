// ALU: 64-bit arithmetic and logic unit with a Vedic multiplier and a
// multiply-accumulate path.
//
// The operation selected by op is computed combinationally from r1 and r2
// and, in a cycle with en high, stored in the 128-bit output register aluout,
// which also serves as the accumulator of the MAC instruction
// (aluout <= aluout + r1 * r2). zero is the Z flag of the stored value and
// valid says whether the last executed instruction produced a result (the
// no-op codes clear it). Result latency: one clock edge after en.
//
// As the design proposes, multiplication uses the Urdhva Tiryakbhyam
// multiplier (vedic_mul) and addition, subtraction, increment, decrement and
// the accumulate use MUX-based ripple adders. The list of operations and
// their codes (risc_pkg::opcode_e), the sign extension of differences to
// 128 bits, the behavioural divider (quotient of all ones for a zero
// divisor) and the synchronous active-high reset are this design's own.
module ALU
  import risc_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               en,
  input  opcode_e            op,
  input  logic [WIDTH-1:0]   r1,
  input  logic [WIDTH-1:0]   r2,
  output logic [2*WIDTH-1:0] aluout,
  output logic               zero,
  output logic               valid
);

  localparam int unsigned RW = 2 * WIDTH;

  // ---- shared WIDTH-bit MUX-based adder: ADD, SUB, INC, DEC ----
  logic [WIDTH-1:0] add_y, add_s;
  logic             add_cin, add_cout;

  always_comb begin
    unique case (op)
      OP_SUB:  begin add_y = ~r2;              add_cin = 1'b1; end
      OP_INC:  begin add_y = '0;               add_cin = 1'b1; end
      OP_DEC:  begin add_y = '1;               add_cin = 1'b0; end
      default: begin add_y = r2;               add_cin = 1'b0; end
    endcase
  end

  mux_adder #(.N(WIDTH)) u_add (.x(r1), .y(add_y), .cin(add_cin), .s(add_s), .cout(add_cout));

  // ---- Vedic multiplier and 2*WIDTH-bit accumulate adder ----
  logic [RW-1:0] prod, mac_s;
  logic          mac_cout;

  vedic_mul #(.N(WIDTH)) u_mul (.a(r1), .b(r2), .p(prod));
  mux_adder #(.N(RW)) u_mac (.x(aluout), .y(prod), .cin(1'b0), .s(mac_s), .cout(mac_cout));

  // ---- result selection ----
  logic [RW-1:0] res;

  always_comb begin
    unique case (op)
      OP_ADD, OP_INC: res = {{(WIDTH-1){1'b0}}, add_cout, add_s};
      // A borrow (no carry out of x + ~y + 1) means a negative difference.
      OP_SUB, OP_DEC: res = {{WIDTH{~add_cout}}, add_s};
      OP_MUL:  res = prod;
      OP_DIV:  res = (r2 == '0) ? {{WIDTH{1'b0}}, {WIDTH{1'b1}}}
                                : {{WIDTH{1'b0}}, r1 / r2};
      OP_MAC:  res = mac_s;            // wraps modulo 2^RW
      OP_AND:  res = {{WIDTH{1'b0}}, r1 & r2};
      OP_OR:   res = {{WIDTH{1'b0}}, r1 | r2};
      OP_XOR:  res = {{WIDTH{1'b0}}, r1 ^ r2};
      OP_NOT:  res = {{WIDTH{1'b0}}, ~r1};
      OP_SHL:  res = {{(WIDTH-1){1'b0}}, r1, 1'b0};
      OP_SHR:  res = {{(WIDTH+1){1'b0}}, r1[WIDTH-1:1]};
      OP_CMP:  res = {{(RW-1){1'b0}}, (r1 > r2)};
      default: res = aluout;           // no-op: keep the accumulator
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      aluout <= '0;
      zero   <= 1'b1;
      valid  <= 1'b0;
    end else if (en) begin
      aluout <= res;
      zero   <= (res == '0);
      valid  <= op_writes(op);
    end
  end

  // The accumulate wraps silently; its carry out is not a status bit.
  logic unused_mac_cout;
  assign unused_mac_cout = mac_cout;

endmodule
