// tb_correlator: a random bit stream with markers inserted carrying 0..4
// bit errors. The flag is predicted from a software count of agreeing bits
// over the last 32 bits (>= 29 needed), one cycle after the last marker
// bit; markers with up to 3 errors must be found, one with 4 must not.
// Lowering search must suppress the flag.
module tb_correlator;
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
  logic       bit_in, search, sync_flag;
  logic [5:0] match_count;
  correlator dut (.clk, .rst, .bit_in, .search, .sync_flag, .match_count);
  initial begin
    logic [31:0] hist, m;
    logic [31:0] m0;
    bit          exp_flag;
    int          found [5];
    int          agree, nerr, idx;
    bit_in = 0; search = 1; hist = '0; exp_flag = 0; m0 = 32'h1ACFFC1D;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    foreach (found[i]) found[i] = 0;
    for (int r = 0; r < 50; r++) begin
      nerr = r % 5;
      m = 32'h1ACFFC1D;
      for (int e = 0; e < nerr; e++) m[(e * 7 + r) % 32] ^= 1'b1;
      search <= (r != 49);
      for (int i = 0; i < 32 + 64; i++) begin
        bit b;
        b = (i < 32) ? m[31 - i] : 1'($urandom);
        bit_in <= b;
        hist = {hist[30:0], b};
        agree = 0;
        for (int k = 0; k < 32; k++) agree += (hist[k] == m0[k]) ? 1 : 0;
        @(posedge clk);
        #1;
        check(sync_flag == (agree >= 29 && search), $sformatf("round %0d bit %0d flag", r, i));
        if (i == 31 && sync_flag) found[nerr]++;
      end
    end
    check(found[0] == 10 && found[1] == 10 && found[2] == 10 && found[3] == 10,
          "markers with up to 3 errors found");
    check(found[4] == 0, "marker with 4 errors rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
