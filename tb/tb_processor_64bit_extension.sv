// tb_processor_64bit_extension: end-to-end test of the processor at its
// default size (64-bit operands, 4-bit addresses).
//
// A new instruction (opcode on prst_addr, operands on a and b) is presented
// every two cycles, at the start of each FETCH phase. A model keeps the
// expected accumulator and the expected address (the PC, counting
// instructions modulo 16) and queues every result that should be written
// back. Each cycle with wr high must match the front of the queue in data,
// address and Z flag, and arrive exactly three cycles after its
// instruction was presented. The program runs the 14 instructions on the
// operands of the design's own simulation example (a = 111111156, b = 255,
// where a + b = 111111411 and a / b = 435730), then random instructions and
// operands, a reset in mid-run, and a MAC chain. It counts how often each
// mechanism happened (each opcode, no-op without write-back, MAC chain, Z
// flag, negative difference, divide by zero, PC wrap, reset) and counts a
// failure for any that never did.
module tb_processor_64bit_extension;
  import risc_pkg::*;
  import tb_ref_pkg::*;

  typedef struct packed {
    logic [127:0] data;
    logic [3:0]   addr;
    int           due;
  } wb_t;

  logic         clk = 1'b0, rst = 1'b1;
  logic [63:0]  a = '0, b = '0;
  logic [3:0]   prst_addr = 4'(OP_NOP0);
  logic [3:0]   addressbus;
  logic [127:0] databus;
  logic         wr, zflag;

  int checks = 0, failures = 0;
  int n = 0;                    // rising edges since reset release

  always @(posedge clk) n <= rst ? 0 : n + 1;
  wb_t q[$];
  logic [127:0] acc = '0;
  logic [3:0]   pc = '0;
  opcode_e      prev_op = OP_NOP0;
  int           seen_op[16];
  int seen_mac_chain = 0, seen_zero = 0, seen_neg = 0, seen_div0 = 0, seen_wrap = 0;
  int seen_reset = 0, seen_add_example = 0, seen_div_example = 0;

  processor_64bit_extension dut (.clk, .rst, .a, .b, .prst_addr, .addressbus, .databus, .wr, .zflag);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at n=%0d", what, n);
    end
  endtask

  // Write-back checker.
  always @(negedge clk) begin
    if (!rst) begin
      if (wr) begin
        if (q.size() == 0) begin
          check("unexpected write", 1'b0);
        end else begin
          wb_t e;
          e = q.pop_front();
          check("data", databus == e.data);
          check("address", addressbus == e.addr);
          check("zflag", zflag == (e.data == 128'd0));
          check("latency", n == e.due);
          if (n != e.due && failures < 3) $display("  got n=%0d due=%0d", n, e.due);
          if (e.data == 128'd0) seen_zero++;
          if (databus == 128'd111111411) seen_add_example++;
          if (databus == 128'd435730) seen_div_example++;
        end
      end else if (q.size() != 0 && q[0].due < n) begin
        check("missing write", 1'b0);
        void'(q.pop_front());
      end
    end
  end

  // Present one instruction for a whole FETCH/EXECUTE pair.
  task automatic issue(input opcode_e op, input logic [63:0] x, input logic [63:0] y);
    a = x; b = y; prst_addr = op;
    acc = alu_ref(op, x, y, acc);
    if (op_writes(op)) q.push_back('{data: acc, addr: pc, due: n + 3});
    seen_op[op]++;
    if (op == OP_MAC && prev_op == OP_MAC) seen_mac_chain++;
    if (op == OP_SUB && x < y) seen_neg++;
    if (op == OP_DIV && y == 64'd0) seen_div0++;
    if (pc == 4'd15) seen_wrap++;
    pc = pc + 1'b1;
    prev_op = op;
    repeat (2) @(negedge clk);
  endtask

  task automatic do_reset();
    rst = 1'b1;
    prst_addr = 4'(OP_NOP0);
    repeat (3) @(negedge clk);
    q.delete();
    acc = '0;
    pc = '0;
    prev_op = OP_NOP0;
    check("reset clears outputs", databus == '0 && !wr && addressbus == '0);
    rst = 1'b0;
    seen_reset++;
  endtask

  initial begin
    do_reset();
    // The 14 instructions on the example operands.
    for (int o = 0; o < 14; o++) issue(opcode_e'(o), 64'd111111156, 64'd255);
    issue(OP_NOP0, 64'd111111156, 64'd255);
    issue(OP_SUB, 64'd255, 64'd111111156);
    issue(OP_DIV, 64'd7, 64'd0);
    issue(OP_AND, 64'hF0, 64'h0F);
    for (int k = 0; k < 8; k++) issue(OP_MAC, rand64(), rand64());
    // Random instructions.
    for (int k = 0; k < 400; k++) begin
      opcode_e o;
      logic [63:0] x, y;
      o = opcode_e'($urandom() % 16);
      x = ($urandom() % 8 == 0) ? 64'($urandom() % 4) : rand64();
      y = ($urandom() % 8 == 0) ? 64'($urandom() % 4) : rand64();
      issue(o, x, y);
    end
    // Reset in mid-run, then continue.
    issue(OP_MUL, rand64(), rand64());
    do_reset();
    issue(OP_MAC, 64'd3, 64'd4);
    issue(OP_MAC, 64'd5, 64'd6);
    issue(OP_XOR, 64'd9, 64'd9);
    issue(OP_NOP1, '0, '0);
    issue(OP_NOP1, '0, '0);
    repeat (4) @(negedge clk);
    check("all writes seen", q.size() == 0);

    for (int o = 0; o < 16; o++) begin
      check($sformatf("opcode %0d used", o), seen_op[o] > 0);
      $display("opcode %-6s issued %0d times", opcode_e'(o), seen_op[o]);
    end
    check("MAC chain", seen_mac_chain > 0);
    check("Z flag set", seen_zero > 0);
    check("negative difference", seen_neg > 0);
    check("divide by zero", seen_div0 > 0);
    check("PC wrap", seen_wrap > 0);
    check("reset", seen_reset > 1);
    check("a+b = 111111411", seen_add_example > 0);
    check("a/b = 435730", seen_div_example > 0);
    $display("MAC chains %0d, zero results %0d, negative SUB %0d, DIV by 0 %0d, PC wraps %0d, resets %0d",
             seen_mac_chain, seen_zero, seen_neg, seen_div0, seen_wrap, seen_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
