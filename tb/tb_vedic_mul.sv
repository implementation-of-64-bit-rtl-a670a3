// tb_vedic_mul: checks the Urdhva Tiryakbhyam multiplier. The 64x64
// default instance gets corner operands and random ones; an 8x8 instance,
// the size of the design's figure, is checked exhaustively (this covers the
// operands, such as 143 x 159, where the second adder's carry matters).
module tb_vedic_mul;
  logic [63:0]  a, b;
  logic [127:0] p;
  logic [7:0]   a8, b8;
  logic [15:0]  p8;
  int checks = 0, failures = 0;

  vedic_mul dut (.a, .b, .p);
  vedic_mul #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check64(input logic [63:0] x, input logic [63:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (p !== {64'd0, x} * {64'd0, y}) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h", x, y, p);
    end
  endtask

  initial begin
    check64(64'd111111156, 64'd255);
    check64('1, '1);
    check64('0, '1);
    check64('1, 64'd1);
    check64(64'hFFFF_FFFF, 64'hFFFF_FFFF_0000_0001);
    for (int v = 0; v < 3000; v++) check64({$urandom(), $urandom()}, {$urandom(), $urandom()});
    for (int v = 0; v < 500; v++) check64(64'($urandom()), {$urandom(), $urandom()});
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL8 %0d * %0d = %0d", a8, b8, p8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
