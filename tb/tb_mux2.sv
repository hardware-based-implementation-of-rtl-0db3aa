// tb_mux2: random operands through an 8-bit and a 1-bit multiplexer,
// compared with the selected input.
module tb_mux2;
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
  logic [7:0] a, b, y;
  logic       sel, a1, b1, y1;
  mux2 #(.WIDTH(8)) u8 (.a, .b, .sel, .y);
  mux2 #(.WIDTH(1)) u1 (.a(a1), .b(b1), .sel, .y(y1));
  initial begin
    for (int i = 0; i < 200; i++) begin
      a = 8'($urandom); b = 8'($urandom); sel = 1'($urandom); a1 = 1'($urandom); b1 = 1'($urandom);
      #1;
      check(y == (sel ? b : a), "8-bit select");
      check(y1 == (sel ? b1 : a1), "1-bit select");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
