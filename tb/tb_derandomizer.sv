// tb_derandomizer: codeblocks of 255 random bytes, randomized with the
// reference CCSDS sequence, are sent bit by bit after a one-cycle sync
// flag. The derandomizer must return the original bytes with sof on the
// first and eof on the 255th, one byte per eight clocks, ignore a sync
// flag that arrives while it is busy, and go idle after the codeblock.
module tb_derandomizer;
  import rs_ref_pkg::*;
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
  logic       bit_in, sync_flag, busy, derand_bit, out_valid, out_sof, out_eof;
  logic [7:0] out_byte;
  derandomizer #(.N(255)) dut (.clk, .rst, .bit_in, .sync_flag, .busy, .derand_bit,
    .out_valid, .out_byte, .out_sof, .out_eof);
  int got[$];
  int sofs, eofs, last_t, gaps_ok, t;
  always @(posedge clk) begin
    t++;
    if (out_valid) begin
      got.push_back(int'(out_byte));
      if (out_sof) sofs++;
      if (out_eof) eofs++;
      if (got.size() > 1 && t - last_t != 8) gaps_ok = 0;
      last_t = t;
    end
  end
  initial begin
    bit seq[];
    int data [255];
    bit_in = 0; sync_flag = 0; t = 0; gaps_ok = 1;
    prbs_bits(255 * 8, seq);
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 3; f++) begin
      foreach (data[i]) data[i] = int'($urandom_range(0, 255));
      got.delete(); sofs = 0; eofs = 0;
      repeat (5) begin bit_in <= 1'($urandom); @(posedge clk); end
      for (int i = 0; i < 255 * 8; i++) begin
        sync_flag <= (i == 0) || (i == 100);   // second flag arrives while busy
        bit_in    <= 1'(data[i / 8] >> (7 - i % 8)) ^ seq[i];
        @(posedge clk);
      end
      sync_flag <= 0;
      @(posedge clk);
      #1 check(!busy, "idle after the codeblock");
      check(got.size() == 255, $sformatf("frame %0d: %0d bytes", f, got.size()));
      if (got.size() == 255)
        foreach (data[i]) if (got[i] != data[i]) check(0, $sformatf("byte %0d", i)); else checks++;
      check(sofs == 1 && eofs == 1, "one sof and one eof");
    end
    check(gaps_ok == 1, "one byte per eight clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
