// tb_encoder_top: the transmit chain at its default size. Each frame on
// the serial line must be the marker 1ACFFC1D followed by 2040 bits that,
// after removing the reference CCSDS sequence, form the RS(255,223)
// codeword of the next 223 ramp bytes (the ramp continues across frames).
// Frames must follow each other every 8*(4+255) = 2072 clocks.
module tb_encoder_top;
  import rs_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic en, serial_out, serial_valid, frame_start;
  encoder_top dut (.clk, .rst, .en, .serial_out, .serial_valid, .frame_start);
  initial begin
    bit seq[];
    int msg[], cw[];
    int last_start, ramp, nbad, now_t;
    logic [31:0] asm_rx;
    gf_init(8, 'h187, 112, 11);
    prbs_bits(2040, seq);
    msg = new[223];
    en = 0; ramp = 0; last_start = -1; now_t = 0;
    repeat (3) @(posedge clk);
    rst <= 0; en <= 1;
    for (int f = 0; f < 4; f++) begin
      do begin @(posedge clk); #1; now_t++; end while (!frame_start);
      if (f > 0) check(now_t - last_start == 2072, $sformatf("frame period %0d", now_t - last_start));
      last_start = now_t;
      check(serial_valid, "serial_valid");
      for (int i = 0; i < 32; i++) begin
        asm_rx[31 - i] = serial_out;
        @(posedge clk); #1; now_t++;
      end
      check(asm_rx == 32'h1ACFFC1D, $sformatf("frame %0d marker %08x", f, asm_rx));
      foreach (msg[i]) msg[i] = (ramp + i) % 256;
      ramp += 223;
      encode(255, 223, msg, cw);
      nbad = 0;
      for (int i = 0; i < 2040; i++) begin
        if ((serial_out ^ seq[i]) != 1'(cw[i / 8] >> (7 - i % 8))) nbad++;
        if (i < 2039) begin @(posedge clk); #1; now_t++; end
      end
      check(nbad == 0, $sformatf("frame %0d: %0d codeblock bits wrong", f, nbad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
