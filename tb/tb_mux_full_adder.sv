// tb_mux_full_adder: exhaustive truth-table check of the MUX-based full
// adder: {carry, sum} must equal a + b + c for all eight inputs.
module tb_mux_full_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  mux_full_adder dut (.a, .b, .c, .sum, .carry);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> carry=%b sum=%b", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
