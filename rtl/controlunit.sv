// controlunit: timing generator of the processor.
//
// A one-flip-flop state machine that alternates two phases, FETCH and
// EXECUTE, one clock cycle each, so every instruction takes two cycles. In
// FETCH the instruction register and the operand registers load and the
// previous result is written back; in EXECUTE the ALU computes and the PC
// advances. Synchronous active-high reset enters FETCH. The design says only
// that the control unit generates the timing signals; the two-phase scheme is
// this design's own, sized to the single register the design reports for it.
module controlunit (
  input  logic clk,
  input  logic rst,
  output logic fetch,
  output logic execute
);

  typedef enum logic {FETCH = 1'b0, EXECUTE = 1'b1} phase_e;
  phase_e phase;

  always_ff @(posedge clk) begin
    if (rst) phase <= FETCH;
    else     phase <= (phase == FETCH) ? EXECUTE : FETCH;
  end

  assign fetch   = (phase == FETCH);
  assign execute = (phase == EXECUTE);

endmodule
