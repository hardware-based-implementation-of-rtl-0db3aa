// tb_ccsds_top: end-to-end test of the whole system at its default size
// (RS(255,223), 32-bit marker, 8 clocks per symbol), top instantiated
// without parameter overrides.
//
// The transmitter runs continuously; the channel flips chosen line bits:
//   frame 0  clean                         -> no syndrome, ramp delivered
//   frame 1  8 corrupted symbols           -> corrected
//   frame 2  2 marker bits + 16 symbols    -> synced with errors, corrected
//   frame 3  20 corrupted symbols          -> reported uncorrectable
//   frame 4  5 marker bits                 -> frame not acquired
//   frame 5  3 marker bits + 1 symbol      -> synced, corrected
// Every delivered frame's bytes are compared with the ramp the transmitter
// sent (223 bytes per frame, continuing across frames). In parallel the
// sample generator streams a 64-word frame into a testbench sink with
// random back-pressure and must deliver the ramp with tlast every 64 words.
// Each mechanism (marker found, marker found despite bit errors, marker
// missed, clean codeblock, correction, uncorrectable codeblock, stream
// back-pressure, stream packet end) is counted and must occur.
module tb_ccsds_top;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        tx_en, chan_err, tx_serial_out, tx_serial_valid, tx_frame_start;
  logic        rx_sync_flag, rx_derand_bit, rx_syn_nonzero, rx_valid, rx_sof, rx_eof, rx_corrected;
  logic        rx_cw_done, rx_cw_fail;
  logic [7:0]  rx_byte;
  logic [5:0]  rx_cw_nerr;
  logic        daq_aresetn, daq_en, daq_axi_en, daq_tvalid, daq_tready, daq_tlast;
  logic [31:0] daq_frame_size, daq_tdata;

  ccsds_top dut (.*);

  localparam int NFRAMES = 6;
  // symbol errors per frame, marker bit errors per frame
  int sym_err [NFRAMES] = '{0, 8, 16, 20, 0, 1};
  int asm_err [NFRAMES] = '{0, 0, 2, 0, 5, 3};

  // channel: pick flipped bit positions for each frame
  int  frame_idx = -1, bit_idx = 0;
  bit  flip [NFRAMES][2072];
  always @(posedge clk) begin
    if (rst) ;
    else if (tx_frame_start) begin frame_idx++; bit_idx = 0; end
    else if (frame_idx >= 0) bit_idx++;
  end
  always_comb begin
    chan_err = 1'b0;
    if (rst) chan_err = 1'b0;
    else if (tx_frame_start) chan_err = (frame_idx + 1 < NFRAMES) ? flip[frame_idx + 1][0] : 1'b0;
    else if (frame_idx >= 0 && frame_idx < NFRAMES && bit_idx + 1 < 2072)
      chan_err = flip[frame_idx][bit_idx + 1];
  end

  // mechanism counters
  int n_sync = 0, n_sync_err = 0, n_missed = 0, n_clean = 0, n_corr_bytes = 0, n_fail = 0, n_stall = 0, n_tlast = 0;
  int rx_frames [$];       // transmitted frame index of each delivered codeblock
  int rx_count = 0, byte_i = 0, cw_seen = 0;
  int sync_frame = 0;
  always @(posedge clk) if (!rst) begin
    if (rx_sync_flag) begin
      n_sync++;
      if (frame_idx >= 0 && frame_idx < NFRAMES && asm_err[frame_idx] > 0) n_sync_err++;
      rx_frames.push_back(frame_idx);
    end
    if (rx_corrected) n_corr_bytes++;
    if (rx_cw_done) begin
      int f;
      f = rx_frames[cw_seen];
      if (f < NFRAMES) begin
        if (sym_err[f] == 0) begin
          check(!rx_cw_fail && rx_cw_nerr == 0, $sformatf("frame %0d clean", f));
          n_clean++;
        end else if (sym_err[f] <= 16) begin
          check(!rx_cw_fail && int'(rx_cw_nerr) == sym_err[f],
                $sformatf("frame %0d corrected %0d of %0d", f, rx_cw_nerr, sym_err[f]));
        end else begin
          check(rx_cw_fail, $sformatf("frame %0d reported uncorrectable", f));
          if (rx_cw_fail) n_fail++;
        end
      end
      cw_seen++;
    end
    if (rx_valid) begin
      int f;
      f = rx_frames[rx_count];
      if (f < NFRAMES && sym_err[f] <= 16) begin
        if (int'(rx_byte) != (f * 223 + byte_i) % 256)
          check(0, $sformatf("frame %0d byte %0d got %02x exp %02x", f, byte_i, rx_byte, (f * 223 + byte_i) % 256));
        else checks++;
      end
      if (rx_eof) begin rx_count++; byte_i = 0; end else byte_i++;
    end
  end

  // stream sink
  int daq_exp = 0;
  always @(posedge clk) begin
    if (!rst && daq_tvalid && daq_tready) begin
      if (int'(daq_tdata) != daq_exp) check(0, $sformatf("stream word %0d", daq_exp));
      else checks++;
      if (daq_tlast) begin
        n_tlast++;
        check(daq_exp % 64 == 63, "tlast every 64 words");
      end
      daq_exp++;
    end
    if (!rst && daq_tvalid && !daq_tready) n_stall++;
    daq_tready <= 1'($urandom_range(0, 2) != 0);
  end

  initial begin
    int p, q;
    int used [255];
    frame_idx = -1; bit_idx = 0; daq_exp = 0; cw_seen = 0; rx_count = 0; byte_i = 0;
    foreach (flip[f, i]) flip[f][i] = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int e = 0; e < asm_err[f]; e++) flip[f][(e * 9 + 3 * f) % 32] = 1;
      foreach (used[i]) used[i] = 0;
      for (int e = 0; e < sym_err[f]; e++) begin
        do p = int'($urandom_range(0, 254)); while (used[p] != 0);
        used[p] = 1;
        q = int'($urandom_range(1, 255));
        for (int b = 0; b < 8; b++) flip[f][32 + 8 * p + b] = 1'(q >> b);
      end
    end
    tx_en = 0;
    daq_aresetn = 0; daq_en = 0; daq_axi_en = 0; daq_frame_size = 64;
    repeat (3) @(posedge clk);
    rst <= 0; tx_en <= 1;
    daq_aresetn <= 1; daq_en <= 1; daq_axi_en <= 1;
    repeat (NFRAMES * 2072 + 2000) @(posedge clk);
    n_missed = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      bit hit;
      hit = 0;
      foreach (rx_frames[i]) if (rx_frames[i] == f) hit = 1;
      if (!hit) n_missed++;
      check(hit == (asm_err[f] <= 3 ? 1'b1 : 1'b0), $sformatf("frame %0d acquisition", f));
    end
    foreach (rx_frames[i]) check(rx_frames[i] != 4, "frame with 5 marker errors not acquired");
    check(rx_count >= NFRAMES - 1, $sformatf("%0d frames delivered", rx_count));
    $display("INFO sync=%0d sync_with_marker_errors=%0d missed=%0d clean=%0d corrected_bytes=%0d uncorrectable=%0d stalls=%0d packets=%0d",
             n_sync, n_sync_err, n_missed, n_clean, n_corr_bytes, n_fail, n_stall, n_tlast);
    check(n_sync > 0, "marker found");
    check(n_sync_err > 0, "marker found despite bit errors");
    check(n_missed > 0, "marker missed");
    check(n_clean > 0, "clean codeblock");
    check(n_corr_bytes > 0, "symbols corrected");
    check(n_fail > 0, "uncorrectable codeblock reported");
    check(n_stall > 0, "stream back-pressure");
    check(n_tlast > 0, "stream packet end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
