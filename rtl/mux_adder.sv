// mux_adder: N-bit ripple-carry adder built from MUX-based full adders.
//
// s = x + y + cin, with the carry out of the top bit on cout. Each bit is a
// mux_full_adder (two 4:1 multiplexers); bit k takes its carry from bit k-1.
// The design uses 8-bit instances of this adder inside the 8x8 Vedic
// multiplier and builds wider adders the same way; the ripple chain and the
// carry-in (which lets the ALU subtract with x + ~y + 1) are this design's
// own choices. Combinational; the delay grows linearly with N. Each carry
// is marked public for verilator so that its model keeps the carry as a
// signal; otherwise it expands the whole chain into one expression whose
// size doubles with every bit.
module mux_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  for (genvar k = 0; k < N; k++) begin : g_bit
    logic ci, co /*verilator public_flat*/;
    if (k == 0) begin : g_first
      assign ci = cin;
    end else begin : g_next
      assign ci = g_bit[k-1].co;
    end
    mux_full_adder u_fa (.a(x[k]), .b(y[k]), .c(ci), .sum(s[k]), .carry(co));
  end

  assign cout = g_bit[N-1].co;

endmodule
