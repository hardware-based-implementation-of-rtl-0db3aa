// tb_dma_transfer: the two DMA transfer workloads of the acquisition side,
// with the sample generator at its default width and a stream sink standing
// in for the S2MM channel of the DMA.
// 1. Direct register mode: one transfer of 0x20000 bytes. The generator is
//    set to 0x8000-word packets; the sink accepts words until tlast, then
//    the 0x8000 stored words must be the ramp 0..0x7FFF and tlast must come
//    with the last one only.
// 2. Scatter-gather mode: three back-to-back packets of 0x8000 words into
//    three buffers with random back-pressure. The ramp must run on across
//    packet boundaries without a gap or a repeat.
module tb_dma_transfer;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int WORDS = 32'h8000;  // 0x20000 bytes of 32-bit words

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] frame_size, tdata;
  logic        aresetn, en, axi_en, tvalid, tready, tlast;
  sample_generator dut (.aclk(clk), .aresetn, .frame_size, .en, .axi_en, .m_axis_tdata(tdata),
    .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast));

  // receive one packet into buf; returns the number of stalled cycles
  task automatic receive_packet(output int nwords, output int nstall, output int ntlast,
                                ref logic [31:0] buf_q [$], input bit random_ready);
    bit done_p;
    nwords = 0; nstall = 0; ntlast = 0; done_p = 0;
    while (!done_p) begin
      @(negedge clk);
      tready = random_ready ? 1'($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      if (tvalid && tready) begin
        buf_q.push_back(tdata);
        nwords++;
        if (tlast) begin ntlast++; done_p = 1; end
      end else if (tvalid) nstall++;
    end
    @(negedge clk);
    tready = 1'b0;
  endtask

  initial begin
    logic [31:0] mem [$];
    int nw, ns, nt, bad, total_stall;
    aresetn = 0; en = 0; axi_en = 0; tready = 0; frame_size = 32'(WORDS);
    repeat (3) @(posedge clk);
    @(negedge clk);
    aresetn = 1;

    // 1. direct register mode: one 0x20000-byte transfer
    en = 1; axi_en = 1;
    receive_packet(nw, ns, nt, mem, 1'b0);
    check(nw == WORDS, $sformatf("direct transfer length %0d words", nw));
    check(nw * 4 == 32'h20000, "direct transfer is 0x20000 bytes");
    check(nt == 1, "one tlast per transfer");
    bad = 0;
    foreach (mem[i]) if (mem[i] != 32'(i)) bad++;
    check(bad == 0, $sformatf("direct transfer data, %0d wrong words", bad));
    check(mem[WORDS-1] == 32'h7FFF, "last word 0x7FFF");
    axi_en = 0; en = 0;
    repeat (4) @(negedge clk);

    // 2. scatter-gather mode: three buffers filled back to back
    en = 1; axi_en = 1;
    total_stall = 0;
    for (int d = 0; d < 3; d++) begin
      mem.delete();
      receive_packet(nw, ns, nt, mem, 1'b1);
      total_stall += ns;
      check(nw == WORDS && nt == 1, $sformatf("descriptor %0d: %0d words", d, nw));
      bad = 0;
      foreach (mem[i]) if (mem[i] != 32'(d * WORDS + i)) bad++;
      check(bad == 0, $sformatf("descriptor %0d data, %0d wrong words", d, bad));
    end
    check(total_stall > 0, "back-pressure exercised");
    $display("INFO direct_words=%0d sg_buffers=3 stalls=%0d", WORDS, total_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
