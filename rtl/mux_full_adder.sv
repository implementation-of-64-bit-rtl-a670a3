// mux_full_adder: one-bit full adder made of two 4:1 multiplexers.
//
// Both multiplexers are selected by the addends a (s1) and b (s0); only the
// carry-in c and its inverse reach the data inputs:
//   SUM   mux: I0..I3 = c, ~c, ~c, c   (a ^ b ^ c)
//   CARRY mux: I0..I3 = 0,  c,  c, 1   (majority of a, b, c)
// This is the structure the design proposes for all its adders. Which select
// line is s1 and which s0 is this design's choice; the function is symmetric
// in a and b so it does not matter. Combinational, no timing.
module mux_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  logic nc;
  assign nc = ~c;

  mux4 u_sum   (.i({c, nc, nc, c}),     .s({a, b}), .y(sum));
  mux4 u_carry (.i({1'b1, c, c, 1'b0}), .s({a, b}), .y(carry));

endmodule
