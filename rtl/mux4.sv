// mux4: 4-to-1 multiplexer, the building cell of the MUX-based full adder.
//
// Y = I[{s1,s0}]: select 00 passes I0, 01 passes I1, 10 passes I2, 11 passes
// I3. Purely combinational. The port set (four data inputs, two select lines,
// one output) is the one the design describes; the packing of the data
// inputs into one vector i[3:0] and of the selects into s[1:0] is this
// design's own.
module mux4 (
  input  logic [3:0] i,   // i[k] is data input I_k
  input  logic [1:0] s,   // {s1, s0}
  output logic       y
);

  always_comb begin
    unique case (s)
      2'b00: y = i[0];
      2'b01: y = i[1];
      2'b10: y = i[2];
      2'b11: y = i[3];
    endcase
  end

endmodule
