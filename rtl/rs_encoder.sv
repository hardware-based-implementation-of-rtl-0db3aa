// rs_encoder: systematic Reed-Solomon encoder, LFSR form.
//
// N-K registers R0..R(N-K-1), each one symbol wide. For a message symbol d
// the feedback f = d + R(last) is multiplied by every generator coefficient
// G_i and added into the register chain (R_i <= R_(i-1) + G_i*f,
// R_0 <= G_0*f) while d itself is passed to the output. With parity_sel
// high the feedback is forced to zero through a mux and the chain simply
// shifts, so the parity symbols leave R(last) first. start marks the first
// message symbol and clears the chain for it. The first symbol entered is
// the highest-degree coefficient. Output is registered: out_sym/out_valid
// appear one cycle after the input symbol.
//
// Default code: CCSDS RS(255,223), GF(2^8) with x^8+x^7+x^2+x+1, generator
// roots beta^(112..143), beta = alpha^11, in conventional (not dual) basis.
// The document gives the LFSR structure, the (255,223) size and t = 16;
// the field polynomial and roots are this design's reading of "CCSDS".
// With M=3, POLY=4'hB, N=7, K=3, FCR=1, STEP=1 it is the (7,3) example code.
module rs_encoder
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
  input  logic         start,
  input  logic         parity_sel,
  input  logic [M-1:0] in_sym,
  output logic         out_valid,
  output logic [M-1:0] out_sym
);
  localparam int TWO_T = N - K;
  localparam logic [8*(MAX_2T+1)-1:0] G = rs_gen_poly(TWO_T, FCR, STEP, M, POLY);

  logic [M-1:0] r [TWO_T];
  logic [M-1:0] fb_raw, fb, out_next;

  always_comb begin
    fb_raw = in_sym ^ (start ? '0 : r[TWO_T-1]);
  end
  mux2 #(.WIDTH(M)) u_fb_gate  (.a(fb_raw), .b('0),            .sel(parity_sel), .y(fb));
  mux2 #(.WIDTH(M)) u_out_sel  (.a(in_sym), .b(r[TWO_T-1]),    .sel(parity_sel), .y(out_next));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < TWO_T; i++) r[i] <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sym <= out_next;
        r[0] <= M'(gf_mul(8'(fb), G[7:0], M, POLY));
        for (int i = 1; i < TWO_T; i++)
          r[i] <= ((start && !parity_sel) ? '0 : r[i-1]) ^ M'(gf_mul(8'(fb), G[8*i +: 8], M, POLY));
      end
    end
  end
endmodule
