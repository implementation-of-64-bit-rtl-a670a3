// tb_registerfile: random operand loads, write-backs and addresses against a
// software copy of every register; checks reset.
module tb_registerfile;
  logic clk = 1'b0, rst = 1'b1, load_ops = 1'b0, wb = 1'b0, result_z = 1'b0;
  logic [63:0] a = '0, b = '0, r1, r2, e1 = '0, e2 = '0;
  logic [127:0] result = '0, databus, ed = '0;
  logic [3:0] addr_in = '0, addressbus, ea = '0;
  logic zflag, wr, ez = 1'b0, ew = 1'b0;
  int checks = 0, failures = 0;

  registerfile dut (.clk, .rst, .load_ops, .a, .b, .wb, .result, .result_z, .addr_in,
                    .r1, .r2, .addressbus, .databus, .zflag, .wr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (r1 != 0 || r2 != 0 || databus != 0 || addressbus != 0 || wr) failures++;
    rst = 1'b0;
    for (int k = 0; k < 500; k++) begin
      load_ops = 1'($urandom()); wb = 1'($urandom()); result_z = 1'($urandom());
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      result = {$urandom(), $urandom(), $urandom(), $urandom()};
      addr_in = 4'($urandom());
      if (load_ops) begin e1 = a; e2 = b; end
      if (wb) begin ed = result; ez = result_z; end
      ea = addr_in; ew = wb;
      @(negedge clk);
      checks++;
      if (r1 != e1 || r2 != e2 || databus != ed || addressbus != ea || zflag != ez || wr != ew) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d", k);
      end
    end
    rst = 1'b1;
    @(negedge clk);
    checks++; if (r1 != 0 || databus != 0 || wr) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
