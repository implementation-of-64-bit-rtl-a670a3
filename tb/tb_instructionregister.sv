// tb_instructionregister: loads random opcode/PC pairs, checks the two
// fields after the edge, that they hold while load is low, and the reset
// value (a no-op).
module tb_instructionregister;
  import risc_pkg::*;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [3:0] instr = '0, pc = '0, addr, ei = 4'hF, ea = '0;  // reset value: no-op
  opcode_e op;
  int checks = 0, failures = 0;

  instructionregister dut (.clk, .rst, .load, .instr, .pc, .op, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (op != OP_NOP1 || addr != 4'd0) failures++;
    rst = 1'b0;
    for (int k = 0; k < 300; k++) begin
      load = 1'($urandom());
      instr = 4'($urandom()); pc = 4'($urandom());
      if (load) begin ei = instr; ea = pc; end
      @(negedge clk);
      checks++;
      if (op != opcode_e'(ei) || addr != ea) begin
        failures++;
        $display("FAIL op=%0d addr=%0d exp %0d %0d", op, addr, ei, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
