// tb_error_evaluator: checks Forney error values and the correction.
//
// The evaluator runs beside a chien_search instance; the locator and the
// evaluator polynomial come from the reference model and the received word
// sits in a testbench array read like a synchronous RAM.
// 1. (7,3) example: received alpha^5 alpha^3 alpha^6 alpha^0 ... with errors
//    alpha^5 at x^4 and alpha^2 at x^3 must deliver the message 7 3 2.
// 2. RS(255,223): 0..16 random symbol errors; the K delivered bytes must be
//    the original message, with sof/eof on the first and last byte and one
//    out_corrected pulse per message symbol in error.
module tb_error_evaluator;
  import rs_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  // (7,3)
  logic       st7, busy7, rde7, pv7, root7, done7, fail7;
  logic [2:0] sig7 [3];
  logic [2:0] om7 [2];
  logic [2:0] rda7, pos7, so7, rx7, o7;
  logic [5:0] nr7;
  logic       ov7, osof7, oeof7, oc7;
  int         mem7 [7];
  chien_search #(.M(3), .N(7), .K(3), .POLY(9'h00B), .STEP(1)) c7 (
    .clk, .rst, .start(st7), .sigma(sig7), .degree(6'd2), .busy(busy7), .rd_en(rde7),
    .rd_addr(rda7), .pos_valid(pv7), .pos(pos7), .root(root7), .sig_odd(so7),
    .done(done7), .nroots(nr7), .fail(fail7));
  error_evaluator #(.M(3), .N(7), .K(3), .POLY(9'h00B), .FCR(1), .STEP(1)) e7 (
    .clk, .rst, .start(st7), .step(busy7), .omega(om7), .pos_valid(pv7), .pos(pos7),
    .root(root7), .sig_odd(so7), .rx_sym(rx7), .out_valid(ov7), .out_sym(o7),
    .out_sof(osof7), .out_eof(oeof7), .out_corrected(oc7));
  always @(posedge clk) if (rde7) rx7 <= 3'(mem7[rda7]);

  // RS(255,223)
  logic       st, busy, rde, pv, root, done, fail;
  logic [7:0] sig [17];
  logic [7:0] om [16];
  logic [7:0] rda, pos, so, rx, o;
  logic [5:0] deg, nr;
  logic       ov, osof, oeof, oc;
  int         mem [255];
  chien_search c255 (.clk, .rst, .start(st), .sigma(sig), .degree(deg), .busy, .rd_en(rde),
    .rd_addr(rda), .pos_valid(pv), .pos, .root, .sig_odd(so), .done, .nroots(nr), .fail);
  error_evaluator e255 (.clk, .rst, .start(st), .step(busy), .omega(om), .pos_valid(pv),
    .pos, .root, .sig_odd(so), .rx_sym(rx), .out_valid(ov), .out_sym(o), .out_sof(osof),
    .out_eof(oeof), .out_corrected(oc));
  always @(posedge clk) if (rde) rx <= 8'(mem[rda]);

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

  int got7[$], got[$];
  int ncorr = 0, sofpos = 0, eofpos = 0, cnt = 0;
  always @(posedge clk) if (!rst) begin
    if (ov7) got7.push_back(int'(o7));
    if (ov) begin
      if (osof) sofpos = cnt;
      if (oeof) eofpos = cnt;
      cnt++;
      got.push_back(int'(o));
    end
    if (oc) ncorr++;
  end

  initial begin
    int msg[], cw[], rcv[], errpos[], ref_sig[], sref[];
    int v, p, dup, w, nmsgerr;
    static int r7 [7] = '{7, 3, 5, 1, 6, 4, 1};
    st7 = 0; st = 0; deg = 0;
    foreach (sig7[i]) sig7[i] = '0;
    foreach (om7[i]) om7[i] = '0;
    foreach (sig[i]) sig[i] = '0;
    foreach (om[i]) om[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // (7,3): S = 3,7,5,0; sigma = 1,5,1; omega_i = sum sigma_j S_(i-j)
    gf_init(3, 'hB, 1, 1);
    foreach (r7[i]) mem7[i] = r7[i];
    sig7[0] <= 1; sig7[1] <= 5; sig7[2] <= 1;
    om7[0] <= 3;
    om7[1] <= 3'(7 ^ gmul(5, 3));
    st7 <= 1;
    @(posedge clk);
    st7 <= 0;
    repeat (12) @(posedge clk);
    check(got7.size() == 3, "(7,3) three message symbols");
    if (got7.size() == 3) begin
      check(got7[0] == 7 && got7[1] == 3 && got7[2] == 2,
            $sformatf("(7,3) message %0d %0d %0d", got7[0], got7[1], got7[2]));
    end

    gf_init(8, 'h187, 112, 11);
    msg = new[223];
    for (int f = 0; f <= 16; f++) begin
      foreach (msg[i]) msg[i] = int'($urandom_range(0, 255));
      encode(255, 223, msg, cw);
      rcv = cw;
      v = f;
      errpos = new[v];
      nmsgerr = 0;
      for (int e = 0; e < v; e++) begin
        do begin
          p = int'($urandom_range(0, 254));
          dup = 0;
          for (int q = 0; q < e; q++) if (errpos[q] == p) dup = 1;
        end while (dup != 0);
        errpos[e] = p;
        rcv[p] ^= int'($urandom_range(1, 255));
        if (p < 223) nmsgerr++;
      end
      foreach (rcv[i]) mem[i] = rcv[i];
      sref = new[32];
      for (int j = 0; j < 32; j++) sref[j] = syndrome(255, rcv, j);
      locator(255, errpos, ref_sig);
      for (int i = 0; i <= 16; i++) sig[i] <= (i <= v) ? 8'(ref_sig[i]) : 8'h00;
      for (int i = 0; i < 16; i++) begin
        w = 0;
        for (int j = 0; j <= i && j <= v; j++) w ^= gmul(ref_sig[j], sref[i - j]);
        om[i] <= 8'(w);
      end
      deg <= 6'(v);
      got.delete();
      ncorr = 0; cnt = 0; sofpos = -1; eofpos = -1;
      @(posedge clk);
      st <= 1;
      @(posedge clk);
      st <= 0;
      repeat (262) @(posedge clk);
      check(got.size() == 223, $sformatf("case %0d: %0d bytes delivered", f, got.size()));
      if (got.size() == 223)
        foreach (msg[i])
          if (got[i] != msg[i]) check(0, $sformatf("case %0d byte %0d got %02x exp %02x", f, i, got[i], msg[i]));
          else checks++;
      check(sofpos == 0 && eofpos == 222, $sformatf("case %0d sof/eof at %0d/%0d", f, sofpos, eofpos));
      check(ncorr == nmsgerr, $sformatf("case %0d corrected %0d exp %0d", f, ncorr, nmsgerr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
