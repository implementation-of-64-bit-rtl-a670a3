// tb_mux_adder: exhaustive check of the 8-bit MUX-based ripple adder (all
// x, y and carry-in) plus random vectors on a 64-bit instance.
module tb_mux_adder;
  logic [7:0]  x, y, s;
  logic        cin, cout;
  logic [63:0] wx, wy, ws;
  logic        wcin, wcout;
  int checks = 0, failures = 0;

  mux_adder dut (.x, .y, .cin, .s, .cout);
  mux_adder #(.N(64)) dut64 (.x(wx), .y(wy), .cin(wcin), .s(ws), .cout(wcout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 131072; v++) begin
      {cin, x, y} = 17'(v);
      #1;
      checks++;
      if ({cout, s} !== 9'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d + %0d -> %0d", x, y, cin, {cout, s});
      end
    end
    for (int v = 0; v < 2000; v++) begin
      wx = {$urandom(), $urandom()};
      wy = (v < 10) ? ~wx : {$urandom(), $urandom()};
      wcin = 1'($urandom());
      #1;
      checks++;
      if ({wcout, ws} !== 65'({1'b0, wx}) + 65'({1'b0, wy}) + 65'(wcin)) begin
        failures++;
        if (failures < 10) $display("FAIL64 %h + %h + %0d", wx, wy, wcin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
