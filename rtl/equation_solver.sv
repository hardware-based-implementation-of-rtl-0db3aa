// equation_solver: key-equation solver of the Reed-Solomon decoder.
//
// Phase 1, error locator: the inversionless Berlekamp-Massey algorithm
// runs 2t iterations, one per clock. Iteration r forms the discrepancy
//   D = sum_i sigma_i * S_(r-i)
// and updates sigma <- gamma*sigma + D*x*tau. If D != 0 and 2L <= r the
// old sigma becomes tau, L <- r+1-L and gamma <- D; otherwise tau <- x*tau.
// (sigma: error locator, tau: support polynomial, gamma: last nonzero
// discrepancy, L: locator degree, all as in the document's equations.)
// Phase 2, error evaluator: the same t+1 multipliers and adder tree then
// compute omega_i = sum_j sigma_j * S_(i-j) for i = 0..t-1, one
// coefficient per clock, i.e. omega = S*sigma mod x^t.
// start (the syndrome generator's done, START_B) latches the syndromes;
// done (START_C) pulses 3t+1 cycles later with sigma, omega and L valid
// until the next start. sigma is a scaled version of the monic locator;
// the scale cancels in the Forney ratio. Reusing the locator hardware for
// the evaluator follows the document; one iteration per clock is this
// design's choice.
module equation_solver
  import ccsds_pkg::*;
#(
  parameter int         M    = RS_M,
  parameter int         N    = RS_N,
  parameter int         K    = RS_K,
  parameter logic [8:0] POLY = RS_POLY
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [M-1:0] syn   [N-K],
  output logic         busy,
  output logic         done,
  output logic [M-1:0] sigma [(N-K)/2+1],
  output logic [M-1:0] omega [(N-K)/2],
  output logic [5:0]   degree
);
  localparam int TWO_T = N - K;
  localparam int T     = TWO_T / 2;

  typedef enum logic [1:0] {IDLE, LOCATOR, EVALUATOR} state_t;
  state_t state;

  logic [M-1:0] s   [TWO_T];
  logic [M-1:0] tau [T+1];
  logic [M-1:0] gamma;
  logic [5:0]   r;
  logic [M-1:0] delta;

  // shared multiplier array: sum_i sigma_i * S_(r-i)
  always_comb begin
    delta = '0;
    for (int i = 0; i <= T; i++)
      if (int'(r) - i >= 0 && int'(r) - i < TWO_T)
        delta = delta ^ M'(gf_mul(8'(sigma[i]), 8'(s[int'(r) - i]), M, POLY));
  end

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      done   <= 1'b0;
      r      <= '0;
      gamma  <= '0;
      degree <= '0;
      for (int i = 0; i < TWO_T; i++) s[i] <= '0;
      for (int i = 0; i <= T; i++) begin sigma[i] <= '0; tau[i] <= '0; end
      for (int i = 0; i < T; i++) omega[i] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          for (int i = 0; i < TWO_T; i++) s[i] <= syn[i];
          for (int i = 0; i <= T; i++) begin
            sigma[i] <= (i == 0) ? M'(1) : '0;
            tau[i]   <= (i == 0) ? M'(1) : '0;
          end
          gamma  <= M'(1);
          degree <= '0;
          r      <= '0;
          state  <= LOCATOR;
        end
        LOCATOR: begin
          sigma[0] <= M'(gf_mul(8'(gamma), 8'(sigma[0]), M, POLY));
          for (int i = 1; i <= T; i++)
            sigma[i] <= M'(gf_mul(8'(gamma), 8'(sigma[i]), M, POLY))
                      ^ M'(gf_mul(8'(delta), 8'(tau[i-1]), M, POLY));
          if (delta != '0 && 2 * int'(degree) <= int'(r)) begin
            for (int i = 0; i <= T; i++) tau[i] <= sigma[i];
            degree <= r + 1'b1 - degree;
            gamma  <= delta;
          end else begin
            tau[0] <= '0;
            for (int i = 1; i <= T; i++) tau[i] <= tau[i-1];
          end
          if (int'(r) == TWO_T - 1) begin
            r     <= '0;
            state <= EVALUATOR;
          end else begin
            r <= r + 1'b1;
          end
        end
        EVALUATOR: begin
          omega[r[$clog2(T)-1:0]] <= delta;
          if (int'(r) == T - 1) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            r <= r + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
