// tb_syndrome_gen: checks the syndrome cells.
//
// 1. (7,3) code over GF(8): the received word alpha^0 + alpha^2 x +
//    alpha^4 x^2 + alpha^0 x^3 + alpha^6 x^4 + alpha^3 x^5 + alpha^5 x^6
//    (two symbol errors) must give S1..S4 = alpha^3, alpha^5, alpha^6, 0,
//    i.e. 3, 7, 5, 0, with nonzero set.
// 2. RS(255,223): error-free codewords give all-zero syndromes; codewords
//    with random symbol errors give the directly evaluated syndromes.
// done must follow the last symbol by one cycle.
module tb_syndrome_gen;
  import rs_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       v7, sof7, eof7, done7, nz7;
  logic [2:0] d7;
  logic [2:0] syn7 [4];
  syndrome_gen #(.M(3), .N(7), .K(3), .POLY(9'h00B), .FCR(1), .STEP(1)) u7 (
    .clk, .rst, .in_valid(v7), .in_sof(sof7), .in_eof(eof7), .in_sym(d7),
    .done(done7), .nonzero(nz7), .syn(syn7));

  logic       v, sof, eof, done, nz;
  logic [7:0] d;
  logic [7:0] syn [32];
  syndrome_gen u255 (.clk, .rst, .in_valid(v), .in_sof(sof), .in_eof(eof), .in_sym(d),
                     .done, .nonzero(nz), .syn);

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

  // r(x) in transmission order (x^6 first): alpha^5 alpha^3 alpha^6 alpha^0 alpha^4 alpha^2 alpha^0
  int r7 [7] = '{7, 3, 5, 1, 6, 4, 1};
  int s7 [4] = '{3, 7, 5, 0};

  initial begin
    int msg[];
    int cw[];
    int nerr;
    v7 = 0; sof7 = 0; eof7 = 0; d7 = 0; v = 0; sof = 0; eof = 0; d = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 7; i++) begin
      v7 <= 1; sof7 <= (i == 0); eof7 <= (i == 6); d7 <= 3'(r7[i]);
      @(posedge clk);
    end
    v7 <= 0; eof7 <= 0;
    #1 check(done7 === 1'b1, "(7,3) done one cycle after last symbol");
    for (int j = 0; j < 4; j++)
      check(int'(syn7[j]) == s7[j], $sformatf("(7,3) S%0d got %0d exp %0d", j + 1, syn7[j], s7[j]));
    check(nz7 === 1'b1, "(7,3) nonzero flag");

    gf_init(8, 'h187, 112, 11);
    msg = new[223];
    for (int f = 0; f < 6; f++) begin
      foreach (msg[i]) msg[i] = int'($urandom_range(0, 255));
      encode(255, 223, msg, cw);
      nerr = (f == 0) ? 0 : f * 3;
      for (int e = 0; e < nerr; e++) cw[$urandom_range(0, 254)] ^= int'($urandom_range(1, 255));
      for (int i = 0; i < 255; i++) begin
        v <= 1; sof <= (i == 0); eof <= (i == 254); d <= 8'(cw[i]);
        @(posedge clk);
        if (i < 254) #1 check(done === 1'b0, "done only at the end");
      end
      v <= 0; eof <= 0;
      #1 check(done === 1'b1, "done one cycle after the last symbol");
      for (int j = 0; j < 32; j++)
        check(int'(syn[j]) == syndrome(255, cw, j),
              $sformatf("frame %0d S%0d got %02x exp %02x", f, j, syn[j], syndrome(255, cw, j)));
      if (f == 0) check(nz === 1'b0, "clean codeword: nonzero low");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
