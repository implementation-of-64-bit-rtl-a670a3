// tb_ALU: runs every opcode of the ALU on corner and random operands and
// compares aluout, zero and valid with the reference model one clock edge
// after en. Also checks that aluout holds while en is low, that MAC
// accumulates over a run of instructions, and that reset clears the state.
module tb_ALU;
  import risc_pkg::*;
  import tb_ref_pkg::*;

  logic          clk = 1'b0, rst = 1'b1, en = 1'b0;
  opcode_e       op = OP_NOP0;
  logic [63:0]   r1 = '0, r2 = '0;
  logic [127:0]  aluout, exp_acc;
  logic          zero, valid;
  int checks = 0, failures = 0;

  ALU dut (.clk, .rst, .en, .op, .r1, .r2, .aluout, .zero, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s op=%s r1=%h r2=%h aluout=%h exp=%h", what, op.name(), r1, r2, aluout, exp_acc);
    end
  endtask

  // Drive one operation for one enabled cycle and check the registered result.
  task automatic run(input opcode_e o, input logic [63:0] x, input logic [63:0] y);
    logic [127:0] e;
    @(negedge clk);
    op = o; r1 = x; r2 = y; en = 1'b1;
    e = alu_ref(o, x, y, exp_acc);
    @(negedge clk);
    en = 1'b0;
    exp_acc = e;
    check("result", aluout == e);
    check("zero", zero == (e == 128'd0));
    check("valid", valid == op_writes(o));
  endtask

  initial begin
    exp_acc = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check("reset", aluout == '0 && !valid);
    // the operands of the design's own simulation example
    run(OP_ADD, 64'd111111156, 64'd255);
    check("add example", aluout == 128'd111111411);
    run(OP_DIV, 64'd111111156, 64'd255);
    check("div example", aluout == 128'd435730);
    for (int o = 0; o < 16; o++) begin
      run(opcode_e'(o), '0, '0);
      run(opcode_e'(o), '1, '1);
      run(opcode_e'(o), '1, 64'd1);
      run(opcode_e'(o), 64'd5, 64'd7);
      run(opcode_e'(o), 64'd7, 64'd5);
      for (int v = 0; v < 200; v++) run(opcode_e'(o), rand64(), (v % 7 == 0) ? 64'($urandom()) : rand64());
    end
    // accumulate a run of products
    run(OP_AND, '0, '0);
    for (int v = 0; v < 50; v++) run(OP_MAC, rand64(), rand64());
    // hold while en is low
    @(negedge clk);
    op = OP_ADD; r1 = rand64(); r2 = rand64();
    repeat (3) @(negedge clk);
    check("hold", aluout == exp_acc);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check("reset again", aluout == '0 && zero && !valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
