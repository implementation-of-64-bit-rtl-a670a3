// tb_controlunit: checks that reset gives FETCH and that the phases then
// alternate, exactly one of fetch/execute high in every cycle.
module tb_controlunit;
  logic clk = 1'b0, rst = 1'b1, fetch, execute;
  int checks = 0, failures = 0;

  controlunit dut (.clk, .rst, .fetch, .execute);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (!(fetch && !execute)) failures++;
    rst = 1'b0;
    for (int k = 1; k <= 20; k++) begin
      @(negedge clk);
      checks++;
      if (execute !== k[0] || fetch !== !k[0]) begin
        failures++;
        $display("FAIL cycle %0d fetch=%b execute=%b", k, fetch, execute);
      end
    end
    rst = 1'b1;
    @(negedge clk);
    checks++; if (!(fetch && !execute)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
