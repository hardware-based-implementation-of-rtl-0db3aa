// tb_chien_search: checks the root search.
//
// 1. (7,3) example: sigma = 1 + alpha^6 x + x^2 has its roots at alpha^3
//    and alpha^4, i.e. errors at x^3 and x^4, received positions 3 and 2.
// 2. RS(255,223): locators of 1..16 random positions must flag exactly
//    those positions, count them, and not report failure; claiming one
//    degree more than the polynomial has must report failure.
// done must come N+1 cycles after start, one position per clock.
module tb_chien_search;
  import rs_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       st7, busy7, rde7, pv7, root7, done7, fail7;
  logic [2:0] sig7 [3];
  logic [2:0] rda7, pos7, so7;
  logic [5:0] deg7, nr7;
  chien_search #(.M(3), .N(7), .K(3), .POLY(9'h00B), .STEP(1)) u7 (
    .clk, .rst, .start(st7), .sigma(sig7), .degree(deg7), .busy(busy7), .rd_en(rde7),
    .rd_addr(rda7), .pos_valid(pv7), .pos(pos7), .root(root7), .sig_odd(so7),
    .done(done7), .nroots(nr7), .fail(fail7));

  logic       st, busy, rde, pv, root, done, fail;
  logic [7:0] sig [17];
  logic [7:0] rda, pos, so;
  logic [5:0] deg, nr;
  chien_search u255 (.clk, .rst, .start(st), .sigma(sig), .degree(deg), .busy, .rd_en(rde),
    .rd_addr(rda), .pos_valid(pv), .pos, .root, .sig_odd(so), .done, .nroots(nr), .fail);

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

  bit flagged7 [7];
  bit flagged [255];
  always @(posedge clk) begin
    if (pv7 && root7) flagged7[pos7] = 1;
    if (pv && root) flagged[pos] = 1;
  end

  initial begin
    int ref_sig[], errpos[];
    int v, p, dup, lat;
    bit want [255];
    st7 = 0; st = 0; deg7 = 0; deg = 0;
    foreach (sig7[i]) sig7[i] = '0;
    foreach (sig[i]) sig[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    sig7[0] <= 1; sig7[1] <= 5; sig7[2] <= 1; deg7 <= 2;
    foreach (flagged7[i]) flagged7[i] = 0;
    st7 <= 1;
    @(posedge clk);
    st7 <= 0;
    lat = 1;
    while (!done7) begin @(posedge clk); #1; lat++; end
    check(lat == 7 + 1, $sformatf("(7,3) latency %0d", lat));
    for (int i = 0; i < 7; i++)
      check(flagged7[i] == (i == 2 || i == 3), $sformatf("(7,3) position %0d", i));
    check(nr7 == 2 && !fail7, "(7,3) two roots, no failure");

    gf_init(8, 'h187, 112, 11);
    for (int f = 0; f < 18; f++) begin
      v = (f == 17) ? 5 : f % 17;
      errpos = new[v];
      foreach (want[i]) want[i] = 0;
      for (int e = 0; e < v; e++) begin
        do begin
          p = int'($urandom_range(0, 254));
          dup = 0;
          for (int q = 0; q < e; q++) if (errpos[q] == p) dup = 1;
        end while (dup);
        errpos[e] = p;
        want[p] = 1;
      end
      locator(255, errpos, ref_sig);
      for (int i = 0; i <= 16; i++) sig[i] <= (i <= v) ? 8'(gmul(ref_sig[i], 'h5A)) : 8'h00;
      deg <= 6'((f == 17) ? v + 1 : v);
      foreach (flagged[i]) flagged[i] = 0;
      @(posedge clk);
      st <= 1;
      @(posedge clk);
      st <= 0;
      lat = 1;
      while (!done) begin @(posedge clk); #1; lat++; end
      check(lat == 255 + 1, $sformatf("latency %0d", lat));
      for (int i = 0; i < 255; i++)
        if (flagged[i] != want[i]) check(0, $sformatf("case %0d position %0d", f, i));
        else checks++;
      check(int'(nr) == v, $sformatf("case %0d nroots %0d exp %0d", f, nr, v));
      check(fail == (f == 17), $sformatf("case %0d fail flag", f));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
