// chien_search: finds the roots of the error locator polynomial.
//
// One register per locator term (the document's Chien cell): on start,
// term k is loaded with sigma_k * beta^(k*e0) and on every following clock
// multiplied by beta^k, so in step p the terms sum to sigma(x_p) with
// x_p = beta^(p-(N-1)), the inverse of the locator of received position p
// (p = 0 is the first symbol received). Steps run p = 0..N-1, one per clock.
// Registered outputs, one cycle after step p: pos_valid, pos, root (sum is
// zero: position p is in error) and sig_odd (sum of the odd terms, needed
// by the Forney evaluator). rd_addr/rd_en give p in the step itself so a
// synchronous buffer read lines up with the registered outputs. After the
// last position, done pulses with nroots and fail (root count differs from
// the locator degree, or the degree exceeds t: the codeword cannot be
// corrected). The N-cycle exhaustive search follows the document; the
// root/degree check is this design's addition.
module chien_search
  import ccsds_pkg::*;
#(
  parameter int         M    = RS_M,
  parameter int         N    = RS_N,
  parameter int         K    = RS_K,
  parameter logic [8:0] POLY = RS_POLY,
  parameter int         STEP = RS_STEP
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [M-1:0]         sigma [(N-K)/2+1],
  input  logic [5:0]           degree,
  output logic                 busy,
  output logic                 rd_en,
  output logic [$clog2(N)-1:0] rd_addr,
  output logic                 pos_valid,
  output logic [$clog2(N)-1:0] pos,
  output logic                 root,
  output logic [M-1:0]         sig_odd,
  output logic                 done,
  output logic [5:0]           nroots,
  output logic                 fail
);
  localparam int T  = (N - K) / 2;
  localparam int Q  = (1 << M) - 1;
  localparam int E0 = ((Q - ((N - 1) % Q)) % Q);
  localparam sym_t BETA = gf_pow(8'd2, STEP, M, POLY);
  // INIT[k] = beta^(k*E0) (x_0^k), STP[k] = beta^k
  localparam logic [8*(MAX_2T+1)-1:0] INIT = pow_table(BETA, 0, E0, M, POLY);
  localparam logic [8*(MAX_2T+1)-1:0] STP  = pow_table(BETA, 0, 1, M, POLY);

  logic [M-1:0]         term [T+1];
  logic [$clog2(N)-1:0] cnt;
  logic [M-1:0]         sum_all, sum_odd;
  logic [5:0]           deg_q;

  always_comb begin
    sum_all = '0;
    sum_odd = '0;
    for (int k = 0; k <= T; k++) begin
      sum_all = sum_all ^ term[k];
      if (k % 2 == 1) sum_odd = sum_odd ^ term[k];
    end
  end

  assign rd_en   = busy;
  assign rd_addr = cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      cnt       <= '0;
      deg_q     <= '0;
      pos_valid <= 1'b0;
      pos       <= '0;
      root      <= 1'b0;
      sig_odd   <= '0;
      done      <= 1'b0;
      nroots    <= '0;
      fail      <= 1'b0;
      for (int k = 0; k <= T; k++) term[k] <= '0;
    end else begin
      done      <= 1'b0;
      pos_valid <= busy;
      if (start && !busy) begin
        busy   <= 1'b1;
        cnt    <= '0;
        deg_q  <= degree;
        nroots <= '0;
        for (int k = 0; k <= T; k++)
          term[k] <= M'(gf_mul(8'(sigma[k]), INIT[8*k +: 8], M, POLY));
      end else if (busy) begin
        for (int k = 0; k <= T; k++)
          term[k] <= M'(gf_mul(8'(term[k]), STP[8*k +: 8], M, POLY));
        pos     <= cnt;
        root    <= (sum_all == '0);
        sig_odd <= sum_odd;
        if (sum_all == '0) nroots <= nroots + 1'b1;
        if (int'(cnt) == N - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          fail <= (int'(nroots) + ((sum_all == '0) ? 1 : 0) != int'(deg_q)) || (int'(deg_q) > T);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
