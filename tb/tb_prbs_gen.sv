// tb_prbs_gen: the generator started from all ones must give the CCSDS
// sequence FF 48 0E C0 9A 0D 70 BC ..., repeat after 255 bits, hold while
// advance is low and restart on init.
module tb_prbs_gen;
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
  logic init, advance, prbs_bit;
  prbs_gen dut (.clk, .rst, .init, .advance, .prbs_bit);
  logic [7:0] expb [8] = '{8'hFF, 8'h48, 8'h0E, 8'hC0, 8'h9A, 8'h0D, 8'h70, 8'hBC};
  bit seq [600];
  initial begin
    init = 0; advance = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    init <= 1;
    @(posedge clk);
    init <= 0; advance <= 1;
    for (int i = 0; i < 600; i++) begin
      #1 seq[i] = prbs_bit;
      @(posedge clk);
    end
    for (int b = 0; b < 8; b++) begin
      logic [7:0] v;
      for (int k = 0; k < 8; k++) v[7-k] = seq[8*b + k];
      check(v == expb[b], $sformatf("byte %0d got %02x exp %02x", b, v, expb[b]));
    end
    for (int i = 0; i < 300; i++) check(seq[i] == seq[i + 255], "period 255");
    advance <= 0;
    @(posedge clk);
    #1 begin
      bit h;
      h = prbs_bit;
      repeat (5) @(posedge clk);
      #1 check(prbs_bit == h, "holds while advance is low");
    end
    init <= 1;
    @(posedge clk);
    init <= 0; advance <= 1;
    for (int i = 0; i < 16; i++) begin
      #1 check(prbs_bit == seq[i], "restart from all ones");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
