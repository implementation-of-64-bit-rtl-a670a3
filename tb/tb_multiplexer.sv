// tb_multiplexer: exhaustive check of the 2:1 address multiplexer.
module tb_multiplexer;
  logic sel;
  logic [3:0] pc, mar, y;
  int checks = 0, failures = 0;

  multiplexer dut (.sel, .pc, .mar, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {sel, pc, mar} = 9'(v);
      #1;
      checks++;
      if (y !== (sel ? mar : pc)) begin failures++; $display("FAIL sel=%b pc=%0d mar=%0d y=%0d", sel, pc, mar, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
