// error_evaluator: Forney error values and correction of the buffered data.
//
// Runs in lock-step with chien_search (same start, one step per clock while
// step is high). Its registers hold omega_k * beta^(k*e0) multiplied by
// beta^k each step, giving omega(x_p), and a register xb = x_p^FCR. One
// cycle after step p (when chien_search presents root/sig_odd and the
// received-data buffer presents symbol p) the error value is
//   Y = x_p^FCR * omega(x_p) / (x_p * sigma'(x_p))
// where x_p*sigma'(x_p) is the odd-term sum sig_odd. The received symbol is
// exclusive-ORed with Y where root is high and registered to out_sym. Only
// message positions p < K are output (out_sof at p = 0, out_eof at p = K-1):
// parity symbols are stripped. out_corrected marks a changed symbol.
// The Forney method and stripping of the parity follow the document; the
// inverse is computed as a^(2^m-2) with squarers and multipliers.
module error_evaluator
  import ccsds_pkg::*;
#(
  parameter int         M    = RS_M,
  parameter int         N    = RS_N,
  parameter int         K    = RS_K,
  parameter logic [8:0] POLY = RS_POLY,
  parameter int         FCR  = RS_FCR,
  parameter int         STEP = RS_STEP
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic                 step,
  input  logic [M-1:0]         omega [(N-K)/2],
  input  logic                 pos_valid,
  input  logic [$clog2(N)-1:0] pos,
  input  logic                 root,
  input  logic [M-1:0]         sig_odd,
  input  logic [M-1:0]         rx_sym,
  output logic                 out_valid,
  output logic [M-1:0]         out_sym,
  output logic                 out_sof,
  output logic                 out_eof,
  output logic                 out_corrected
);
  localparam int T  = (N - K) / 2;
  localparam int Q  = (1 << M) - 1;
  localparam int E0 = ((Q - ((N - 1) % Q)) % Q);
  localparam sym_t BETA = gf_pow(8'd2, STEP, M, POLY);
  // INIT[k] = beta^(k*E0) (x_0^k), STP[k] = beta^k
  localparam logic [8*(MAX_2T+1)-1:0] INIT = pow_table(BETA, 0, E0, M, POLY);
  localparam logic [8*(MAX_2T+1)-1:0] STP  = pow_table(BETA, 0, 1, M, POLY);
  localparam sym_t XB0 = gf_pow(BETA, FCR * E0, M, POLY);
  localparam sym_t XBS = gf_pow(BETA, FCR, M, POLY);

  logic [M-1:0] term [T];
  logic [M-1:0] xb;
  logic [M-1:0] om_sum, om_q, xb_q;
  logic [M-1:0] err_val;

  always_comb begin
    om_sum = '0;
    for (int k = 0; k < T; k++) om_sum = om_sum ^ term[k];
  end

  always_comb begin
    err_val = M'(gf_mul(gf_mul(8'(xb_q), 8'(om_q), M, POLY),
                        gf_inv(8'(sig_odd), M, POLY), M, POLY));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      xb            <= '0;
      om_q          <= '0;
      xb_q          <= '0;
      out_valid     <= 1'b0;
      out_sym       <= '0;
      out_sof       <= 1'b0;
      out_eof       <= 1'b0;
      out_corrected <= 1'b0;
      for (int k = 0; k < T; k++) term[k] <= '0;
    end else begin
      if (start && !step) begin
        for (int k = 0; k < T; k++)
          term[k] <= M'(gf_mul(8'(omega[k]), INIT[8*k +: 8], M, POLY));
        xb <= M'(XB0);
      end else if (step) begin
        for (int k = 0; k < T; k++)
          term[k] <= M'(gf_mul(8'(term[k]), STP[8*k +: 8], M, POLY));
        xb   <= M'(gf_mul(8'(xb), XBS, M, POLY));
        om_q <= om_sum;
        xb_q <= xb;
      end
      out_valid     <= pos_valid && (int'(pos) < K);
      out_sof       <= pos_valid && (pos == '0);
      out_eof       <= pos_valid && (int'(pos) == K - 1);
      out_sym       <= rx_sym ^ (root ? err_val : '0);
      out_corrected <= pos_valid && (int'(pos) < K) && root && (err_val != '0);
    end
  end
endmodule
