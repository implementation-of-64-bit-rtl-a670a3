// tb_programCounter: counts with a random increment enable, through the
// wrap from 15 to 0, against a software counter; checks reset to 0.
module tb_programCounter;
  logic clk = 1'b0, rst = 1'b1, inc = 1'b0;
  logic [3:0] pc, e = '0;
  int checks = 0, failures = 0, wraps = 0;

  programCounter dut (.clk, .rst, .inc, .pc);

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
    checks++; if (pc != 0) failures++;
    rst = 1'b0;
    for (int k = 0; k < 200; k++) begin
      inc = ($urandom() % 4) != 0;
      if (inc) begin
        if (e == 4'd15) wraps++;
        e = e + 1'b1;
      end
      @(negedge clk);
      checks++;
      if (pc != e) begin failures++; $display("FAIL pc=%0d exp=%0d", pc, e); end
    end
    inc = 1'b0;
    checks++; if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    rst = 1'b1;
    @(negedge clk);
    checks++; if (pc != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
