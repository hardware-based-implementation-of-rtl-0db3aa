// tb_decoder_top: the receive chain at its default size, fed by a
// testbench-built serial stream: random gaps, markers (some with up to 3
// bit errors), and randomized RS(255,223) codewords of random messages
// with 0..16 symbol errors, plus one codeword with 20 errors. Every
// correctable codeblock must come out as its original 223 message bytes
// with cw_fail low and cw_nerr equal to the number of symbols in error; the
// 20-error block must raise cw_fail. cw_done must follow the last bit of
// its codeblock by a fixed latency of N + 3t + 5 clocks.
module tb_decoder_top;
  import rs_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic       serial_in, sync_flag, derand_bit, syn_nonzero, out_valid, out_sof, out_eof;
  logic       out_corrected, cw_done, cw_fail;
  logic [7:0] out_byte;
  logic [5:0] cw_nerr;
  decoder_top dut (.clk, .rst, .serial_in, .sync_flag, .derand_bit, .syn_nonzero, .out_valid,
    .out_byte, .out_sof, .out_eof, .out_corrected, .cw_done, .cw_fail, .cw_nerr);

  localparam int NF = 20;
  int exp_msg [NF][223];
  int exp_nerr [NF];
  int last_bit_t [NF];
  int t = 0, rx_f = 0, rx_i = 0, done_f = 0;
  always @(posedge clk) t++;
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      if (exp_nerr[rx_f] <= 16) begin
        if (int'(out_byte) != exp_msg[rx_f][rx_i]) check(0, $sformatf("cw %0d byte %0d", rx_f, rx_i));
        else checks++;
      end
      if (out_eof) begin rx_f++; rx_i = 0; end else rx_i++;
    end
    if (!rst && cw_done) begin
      check(t - last_bit_t[done_f] == 255 + 48 + 5,
            $sformatf("cw %0d done latency %0d", done_f, t - last_bit_t[done_f]));
      if (exp_nerr[done_f] <= 16) begin
        check(!cw_fail, $sformatf("cw %0d correctable", done_f));
        check(int'(cw_nerr) == exp_nerr[done_f], $sformatf("cw %0d nerr %0d exp %0d", done_f, cw_nerr, exp_nerr[done_f]));
      end else check(cw_fail, $sformatf("cw %0d must fail", done_f));
      done_f++;
    end
  end

  task automatic send_bit(bit b);
    serial_in <= b;
    @(posedge clk);
  endtask

  initial begin
    bit seq[];
    int msg[], cw[];
    int p, v, dup;
    int used [255];
    logic [31:0] m;
    gf_init(8, 'h187, 112, 11);
    prbs_bits(2040, seq);
    msg = new[223];
    serial_in = 0; t = 0; rx_f = 0; rx_i = 0; done_f = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < NF; f++) begin
      foreach (msg[i]) begin msg[i] = int'($urandom_range(0, 255)); exp_msg[f][i] = msg[i]; end
      encode(255, 223, msg, cw);
      v = (f == 7) ? 20 : f % 17;
      exp_nerr[f] = v;
      foreach (used[i]) used[i] = 0;
      for (int e = 0; e < v; e++) begin
        do p = int'($urandom_range(0, 254)); while (used[p] != 0);
        used[p] = 1;
        cw[p] ^= int'($urandom_range(1, 255));
      end
      repeat (int'($urandom_range(0, 40))) send_bit(1'($urandom));
      m = 32'h1ACFFC1D;
      for (int e = 0; e < f % 4; e++) m[(e * 11 + f) % 32] ^= 1'b1;
      for (int i = 0; i < 32; i++) send_bit(m[31 - i]);
      for (int i = 0; i < 2040; i++) begin
        send_bit(1'(cw[i / 8] >> (7 - i % 8)) ^ seq[i]);
        if (i == 2039) last_bit_t[f] = t;
      end
    end
    repeat (400) send_bit(1'($urandom));
    check(rx_f == NF, $sformatf("%0d codeblocks delivered", rx_f));
    check(done_f == NF, $sformatf("%0d codeblocks finished", done_f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
