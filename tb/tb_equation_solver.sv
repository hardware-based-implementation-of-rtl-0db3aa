// tb_equation_solver: checks the Berlekamp-Massey solver and the error
// evaluator polynomial.
//
// 1. (7,3) example: syndromes alpha^3, alpha^5, alpha^6, 0 must give the
//    locator 1 + alpha^6 x + alpha^0 x^2 (after dividing by sigma_0, as the
//    inversionless form is scaled), degree 2.
// 2. RS(255,223): for 0..16 random error positions the normalised locator
//    must equal prod(1 - X_l x) and omega must equal S*sigma mod x^t.
// done must come 3t+1 cycles after start (2t locator iterations, t
// evaluator coefficients).
module tb_equation_solver;
  import rs_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       st7, busy7, done7;
  logic [2:0] syn7 [4];
  logic [2:0] sig7 [3];
  logic [2:0] om7 [2];
  logic [5:0] deg7;
  equation_solver #(.M(3), .N(7), .K(3), .POLY(9'h00B)) u7 (
    .clk, .rst, .start(st7), .syn(syn7), .busy(busy7), .done(done7), .sigma(sig7),
    .omega(om7), .degree(deg7));

  logic       st, busy, done;
  logic [7:0] syn [32];
  logic [7:0] sig [17];
  logic [7:0] om [16];
  logic [5:0] deg;
  equation_solver u255 (.clk, .rst, .start(st), .syn, .busy, .done, .sigma(sig),
                        .omega(om), .degree(deg));

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

  initial begin
    int msg[], cw[], pos[], ref_sig[], sref[];
    int inv0, lat, v, p, dup;
    st7 = 0; st = 0;
    foreach (syn7[i]) syn7[i] = '0;
    foreach (syn[i]) syn[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // (7,3)
    gf_init(3, 'hB, 1, 1);
    syn7[0] <= 3; syn7[1] <= 7; syn7[2] <= 5; syn7[3] <= 0;
    st7 <= 1;
    @(posedge clk);
    st7 <= 0;
    lat = 1;
    while (!done7) begin @(posedge clk); #1; lat++; end
    check(lat == 3 * 2 + 1, $sformatf("(7,3) latency %0d exp %0d", lat, 7));
    inv0 = ginv(int'(sig7[0]));
    check(gmul(int'(sig7[1]), inv0) == 5, "(7,3) sigma_1 = alpha^6");
    check(gmul(int'(sig7[2]), inv0) == 1, "(7,3) sigma_2 = alpha^0");
    check(deg7 == 2, "(7,3) degree 2");
    // RS(255,223)
    gf_init(8, 'h187, 112, 11);
    msg = new[223];
    for (int f = 0; f <= 16; f++) begin
      foreach (msg[i]) msg[i] = int'($urandom_range(0, 255));
      encode(255, 223, msg, cw);
      v = f;
      pos = new[v];
      for (int e = 0; e < v; e++) begin
        do begin
          p = int'($urandom_range(0, 254));
          dup = 0;
          for (int q = 0; q < e; q++) if (pos[q] == p) dup = 1;
        end while (dup);
        pos[e] = p;
        cw[p] ^= int'($urandom_range(1, 255));
      end
      sref = new[32];
      for (int j = 0; j < 32; j++) begin sref[j] = syndrome(255, cw, j); syn[j] <= 8'(sref[j]); end
      locator(255, pos, ref_sig);
      @(posedge clk);
      st <= 1;
      @(posedge clk);
      st <= 0;
      lat = 1;
      while (!done) begin @(posedge clk); #1; lat++; end
      check(lat == 3 * 16 + 1, $sformatf("latency %0d exp %0d", lat, 49));
      check(int'(deg) == v, $sformatf("%0d errors: degree %0d", v, deg));
      inv0 = ginv(int'(sig[0]));
      for (int i = 0; i <= 16; i++)
        check(gmul(int'(sig[i]), inv0) == ((i <= v) ? ref_sig[i] : 0),
              $sformatf("%0d errors: sigma_%0d", v, i));
      for (int i = 0; i < 16; i++) begin
        int w;
        w = 0;
        for (int j = 0; j <= i && j <= v; j++) w ^= gmul(ref_sig[j], sref[i - j]);
        check(gmul(int'(om[i]), inv0) == w, $sformatf("%0d errors: omega_%0d", v, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
