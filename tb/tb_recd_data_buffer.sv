// tb_recd_data_buffer: random writes and reads against a software array;
// read data must appear one cycle after the read request, and a read and a
// write to different addresses in the same cycle must not disturb each
// other.
module tb_recd_data_buffer;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic       wr_en, rd_en;
  logic [8:0] wr_addr, rd_addr;
  logic [7:0] wr_data, rd_data;
  recd_data_buffer #(.M(8), .AW(9)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);
  int model [512];
  initial begin
    int exp_d;
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    rst <= 0;
    for (int a = 0; a < 512; a++) begin
      wr_en <= 1; wr_addr <= 9'(a); wr_data <= 8'(a * 7 + 3); model[a] = (a * 7 + 3) % 256;
      @(posedge clk);
    end
    wr_en <= 0;
    for (int n = 0; n < 2000; n++) begin
      int ra, wa;
      ra = int'($urandom_range(0, 511));
      do wa = int'($urandom_range(0, 511)); while (wa == ra);
      rd_en <= 1; rd_addr <= 9'(ra);
      wr_en <= 1'($urandom); wr_addr <= 9'(wa); wr_data <= 8'($urandom);
      exp_d = model[ra];
      @(posedge clk);
      if (wr_en) model[wa] = int'(wr_data);
      #1 check(int'(rd_data) == exp_d, $sformatf("read %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
