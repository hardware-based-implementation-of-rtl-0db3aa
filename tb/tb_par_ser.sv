// tb_par_ser: random bytes loaded every eight cycles must come out MSB
// first, one bit per clock, with their valid and sync tags.
module tb_par_ser;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic       load, valid_in, sync_in, ser_bit, ser_valid, ser_sync;
  logic [7:0] byte_in;
  par_ser dut (.clk, .rst, .load, .byte_in, .valid_in, .sync_in, .ser_bit, .ser_valid, .ser_sync);
  initial begin
    logic [7:0] b;
    logic       vv, ss;
    load = 0; byte_in = 0; valid_in = 0; sync_in = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 100; n++) begin
      b = 8'($urandom); vv = 1'($urandom); ss = 1'($urandom);
      load <= 1; byte_in <= b; valid_in <= vv; sync_in <= ss;
      @(posedge clk);
      load <= 0;
      for (int k = 0; k < 8; k++) begin
        #1;
        check(ser_bit == b[7-k], $sformatf("byte %0d bit %0d", n, k));
        check(ser_valid == vv && ser_sync == ss, "tags");
        if (k < 7) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
