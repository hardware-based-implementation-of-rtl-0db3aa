// tb_test_stimulus: over three frames, each frame must present 4 sync
// slots, 223 message slots carrying a ramp that continues across frames,
// then 32 parity slots; start on the first message slot, and sym_valid on
// every tick outside the sync slots.
module tb_test_stimulus;
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
  logic       en, tick, sync_slot, frame_first, sym_valid, start, parity_sel;
  logic [7:0] data;
  logic [2:0] phase;
  clk_divider #(.DIV(8)) div (.clk, .rst, .tick, .phase);
  test_stimulus dut (.clk, .rst, .en, .tick, .sync_slot, .frame_first, .sym_valid, .start,
                     .parity_sel, .data);
  initial begin
    int slot, ramp, nframes;
    en = 0;
    repeat (2) @(posedge clk);
    rst <= 0; en <= 1;
    slot = 0; ramp = 0; nframes = 0;
    while (nframes < 3) begin
      #1;
      if (tick) begin
        check(sync_slot == (slot < 4), $sformatf("sync_slot at slot %0d", slot));
        check(frame_first == (slot == 0), "frame_first");
        check(start == (slot == 4), "start");
        check(parity_sel == (slot >= 227), "parity_sel");
        check(sym_valid == (slot >= 4), "sym_valid");
        if (slot >= 4 && slot < 227) begin
          check(int'(data) == ramp % 256, $sformatf("ramp at slot %0d got %0d exp %0d", slot, data, ramp % 256));
          ramp++;
        end
        slot++;
        if (slot == 259) begin slot = 0; nframes++; end
      end else check(!sym_valid, "sym_valid only on ticks");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
