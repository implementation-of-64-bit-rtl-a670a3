// tb_memoryaddressR: random loads and holds against a software register;
// checks reset clears it.
module tb_memoryaddressR;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [3:0] d = '0, mar, e = '0;
  int checks = 0, failures = 0;

  memoryaddressR dut (.clk, .rst, .load, .d, .mar);

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
    checks++; if (mar != 0) failures++;
    rst = 1'b0;
    for (int k = 0; k < 200; k++) begin
      load = 1'($urandom()); d = 4'($urandom());
      if (load) e = d;
      @(negedge clk);
      checks++;
      if (mar != e) begin failures++; $display("FAIL mar=%0d exp=%0d", mar, e); end
    end
    rst = 1'b1;
    @(negedge clk);
    checks++; if (mar != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
