// syndrome_gen: Reed-Solomon syndrome generator, 2t syndrome cells.
//
// Cell j (j = 0..2t-1) evaluates the received polynomial at the code root
// beta^(FCR+j) by Horner's rule: S_j <= S_j*beta^(FCR+j) + r for every
// received symbol, highest degree first; in_sof restarts the sum with the
// first symbol. After the in_eof symbol the syndromes are copied to syn and
// done pulses one cycle later (the document's START_B / end flag), together
// with nonzero, high when any syndrome differs from zero (an error is
// present). Structure follows the document's cell diagram; the root set is
// the same as the encoder's.
module syndrome_gen
  import ccsds_pkg::*;
#(
  parameter int         M    = RS_M,
  parameter int         N    = RS_N,
  parameter int         K    = RS_K,
  parameter logic [8:0] POLY = RS_POLY,
  parameter int         FCR  = RS_FCR,
  parameter int         STEP = RS_STEP
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic         in_sof,
  input  logic         in_eof,
  input  logic [M-1:0] in_sym,
  output logic         done,
  output logic         nonzero,
  output logic [M-1:0] syn [N-K]
);
  localparam int TWO_T = N - K;
  localparam sym_t BETA = gf_pow(8'd2, STEP, M, POLY);
  // ROOT[j] = beta^(FCR+j)
  localparam logic [8*(MAX_2T+1)-1:0] ROOT = pow_table(BETA, FCR, 1, M, POLY);

  logic [M-1:0] acc [TWO_T];
  logic [M-1:0] nxt [TWO_T];

  always_comb begin
    for (int j = 0; j < TWO_T; j++)
      nxt[j] = in_sym ^ (in_sof ? '0 :
               M'(gf_mul(8'(acc[j]), ROOT[8*j +: 8], M, POLY)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < TWO_T; j++) begin
        acc[j] <= '0;
        syn[j] <= '0;
      end
      done    <= 1'b0;
      nonzero <= 1'b0;
    end else begin
      done <= in_valid && in_eof;
      if (in_valid) begin
        for (int j = 0; j < TWO_T; j++) acc[j] <= nxt[j];
        if (in_eof) begin
          nonzero <= 1'b0;
          for (int j = 0; j < TWO_T; j++) begin
            syn[j] <= nxt[j];
            if (nxt[j] != '0) nonzero <= 1'b1;
          end
        end
      end
    end
  end
endmodule
