// tb_data_shifter: after load the 32 cycles must carry 1ACFFC1D MSB first,
// followed by zeros; a second load must repeat the marker.
module tb_data_shifter;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic load, asm_bit;
  data_shifter dut (.clk, .rst, .load, .asm_bit);
  initial begin
    load = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 3; r++) begin
      load <= 1;
      @(posedge clk);
      load <= 0;
      for (int i = 0; i < 40; i++) begin
        #1 check(asm_bit == ((i < 32) ? 32'h1ACFFC1D >> (31 - i) & 1 : 0), $sformatf("bit %0d", i));
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
