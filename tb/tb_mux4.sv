// tb_mux4: exhaustive check of the 4:1 multiplexer (all 16 data patterns x
// 4 selects) against Y = I[s].
module tb_mux4;
  logic [3:0] i;
  logic [1:0] s;
  logic       y;
  int checks = 0, failures = 0;

  mux4 dut (.i, .s, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++)
      for (int k = 0; k < 4; k++) begin
        i = 4'(d); s = 2'(k);
        #1;
        checks++;
        if (y !== ((d >> k) & 1)) begin
          failures++;
          $display("FAIL i=%b s=%0d y=%b", i, s, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
