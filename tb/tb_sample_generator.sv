// tb_sample_generator: with a 16-word frame and random back-pressure the
// stream must carry the ramp 0, 1, 2, ... without gaps or repeats, tlast on
// every 16th word, data held while tready is low; axi_en low must stop the
// stream and en low must restart the ramp from zero.
module tb_sample_generator;
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
  logic [31:0] frame_size, tdata;
  logic        en, axi_en, tvalid, tready, tlast;
  logic        aresetn;
  sample_generator dut (.aclk(clk), .aresetn, .frame_size, .en, .axi_en, .m_axis_tdata(tdata),
    .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast));
  int expv, nwords, nlast, stalls;
  initial begin
    aresetn = 0; en = 0; axi_en = 0; tready = 0; frame_size = 16;
    repeat (2) @(posedge clk);
    aresetn <= 1; en <= 1; axi_en <= 1;
    expv = 0; nwords = 0; nlast = 0; stalls = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      tready = 1'($urandom_range(0, 3) != 0);
      axi_en = !(c >= 1000 && c < 1010);
      #1;
      if (c >= 1000 && c < 1010) check(!tvalid, "axi_en low stops the stream");
      if (tvalid && tready) begin
        check(int'(tdata) == expv, $sformatf("word %0d got %0d", expv, tdata));
        check(tlast == (expv % 16 == 15), $sformatf("tlast at word %0d", expv));
        if (tlast) nlast++;
        expv++; nwords++;
      end
      if (tvalid && !tready) stalls++;
    end
    check(nlast == nwords / 16, "one tlast per frame");
    check(stalls > 0, "back-pressure exercised");
    @(negedge clk);
    en = 0;
    @(negedge clk);
    en = 1;
    #1 check(tdata == 0, "ramp restarts after en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
