// tb_clk_divider: tick must be high exactly one cycle in every eight,
// starting with the first cycle after reset, and phase must count 0..7.
module tb_clk_divider;
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
  logic       tick;
  logic [2:0] phase;
  clk_divider #(.DIV(8)) dut (.clk, .rst, .tick, .phase);
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int c = 0; c < 400; c++) begin
      #1;
      check(tick == (c % 8 == 0), $sformatf("tick at cycle %0d", c));
      check(int'(phase) == c % 8, $sformatf("phase at cycle %0d", c));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
