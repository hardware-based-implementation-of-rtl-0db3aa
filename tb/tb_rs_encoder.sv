// tb_rs_encoder: checks the LFSR Reed-Solomon encoder.
//
// 1. The (7,3) code over GF(8) (x^3+x+1, roots alpha^1..alpha^4): message
//    alpha^5, alpha^3, alpha^1 (sent highest degree first) must give the
//    codeword alpha^5 alpha^3 alpha^1 alpha^6 alpha^4 alpha^2 alpha^0,
//    i.e. 7 3 2 5 6 4 1, one cycle after each input symbol.
// 2. The CCSDS RS(255,223) default: random messages sent back to back are
//    compared with the long-division reference encoder.
module tb_rs_encoder;
  import rs_ref_pkg::*;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       v7, s7, p7, ov7;
  logic [2:0] d7, o7;
  rs_encoder #(.M(3), .N(7), .K(3), .POLY(9'h00B), .FCR(1), .STEP(1)) u7 (
    .clk, .rst, .in_valid(v7), .start(s7), .parity_sel(p7), .in_sym(d7),
    .out_valid(ov7), .out_sym(o7));

  logic       v, s, p, ov;
  logic [7:0] d, o;
  rs_encoder u255 (.clk, .rst, .in_valid(v), .start(s), .parity_sel(p), .in_sym(d),
                   .out_valid(ov), .out_sym(o));

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

  int exp7 [7] = '{7, 3, 2, 5, 6, 4, 1};
  int msg7 [3] = '{7, 3, 2};

  initial begin
    int msg[];
    int cw[];
    v7 = 0; s7 = 0; p7 = 0; d7 = 0; v = 0; s = 0; p = 0; d = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // (7,3) example
    for (int i = 0; i < 7; i++) begin
      v7 <= 1; s7 <= (i == 0); p7 <= (i >= 3); d7 <= (i < 3) ? 3'(msg7[i]) : 3'd0;
      @(posedge clk);
      #1;
      check(ov7 === 1'b1, "(7,3) out_valid one cycle after input");
      check(int'(o7) == exp7[i], $sformatf("(7,3) symbol %0d got %0d exp %0d", i, o7, exp7[i]));
    end
    v7 <= 0;
    @(posedge clk);
    #1 check(ov7 === 1'b0, "(7,3) out_valid drops");
    // RS(255,223)
    gf_init(8, 'h187, 112, 11);
    msg = new[223];
    for (int f = 0; f < 4; f++) begin
      foreach (msg[i]) msg[i] = (f == 0) ? (i + 1) % 256 : int'($urandom_range(0, 255));
      encode(255, 223, msg, cw);
      for (int i = 0; i < 255; i++) begin
        v <= 1; s <= (i == 0); p <= (i >= 223); d <= (i < 223) ? 8'(msg[i]) : 8'h00;
        @(posedge clk);
        #1;
        if (o !== 8'(cw[i]) || ov !== 1'b1) begin
          check(0, $sformatf("frame %0d symbol %0d got %02x exp %02x", f, i, o, cw[i]));
        end else checks++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
