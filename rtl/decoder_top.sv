// decoder_top: CCSDS receive chain (baseband data processing).
//
// Takes the serial line, one bit per clock, and delivers the corrected
// message bytes of every codeblock:
//   correlator        finds the 32-bit marker (>= 29 bits agreeing)
//   derandomizer      removes the pseudo-random sequence, packs bytes
//   syndrome_gen      2t syndromes per codeblock         (START_B)
//   recd_data_buffer  two-bank store of the received bytes
//   equation_solver   Berlekamp-Massey locator + evaluator (START_C)
//   chien_search      root search over all N positions
//   error_evaluator   Forney values, correction, parity stripped
// The marker search is blanked while a codeblock is being received. The
// decode of one codeblock (N + 3t + 5 clocks after its last bit)
// ends long before the next codeblock (8*(N+4) clocks at one bit per clock)
// has been received, so one equation solver and one Chien search serve the
// stream, and two buffer banks suffice.
// Outputs: out_valid/out_byte with out_sof/out_eof for K bytes per
// codeblock; cw_done pulses after each codeblock with cw_fail (not
// correctable) and cw_nerr (symbols in error). sync_flag, derand_bit,
// syn_nonzero and out_corrected are observation points.
module decoder_top
  import ccsds_pkg::*;
#(
  parameter int N = RS_N,
  parameter int K = RS_K
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       serial_in,
  output logic       sync_flag,
  output logic       derand_bit,
  output logic       syn_nonzero,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic       out_sof,
  output logic       out_eof,
  output logic       out_corrected,
  output logic       cw_done,
  output logic       cw_fail,
  output logic [5:0] cw_nerr
);
  localparam int TWO_T = N - K;
  localparam int T     = TWO_T / 2;
  localparam int IW    = $clog2(N);

  logic       busy_rx;
  logic [5:0] match_count;
  logic       b_valid, b_sof, b_eof;
  logic [7:0] b_byte;
  logic       syn_done;
  logic [7:0] syn [TWO_T];
  logic       es_busy, es_done;
  logic [7:0] sigma [T+1];
  logic [7:0] omega [T];
  logic [5:0] degree;
  logic          cs_busy, rd_en, pos_valid, root;
  logic [IW-1:0] rd_addr, pos;
  logic [7:0]    sig_odd, rd_data;
  logic [IW-1:0] widx, wr_idx;
  logic          wbank, dec_bank;

  correlator u_corr (.clk, .rst, .bit_in(serial_in), .search(!busy_rx),
                     .sync_flag, .match_count);

  derandomizer #(.N(N)) u_derand (
    .clk, .rst, .bit_in(serial_in), .sync_flag, .busy(busy_rx), .derand_bit,
    .out_valid(b_valid), .out_byte(b_byte), .out_sof(b_sof), .out_eof(b_eof));

  syndrome_gen #(.N(N), .K(K)) u_syn (
    .clk, .rst, .in_valid(b_valid), .in_sof(b_sof), .in_eof(b_eof), .in_sym(b_byte),
    .done(syn_done), .nonzero(syn_nonzero), .syn);

  // buffer write side: bank toggles after each codeblock
  assign wr_idx = b_sof ? '0 : widx;
  always_ff @(posedge clk) begin
    if (rst) begin
      widx     <= '0;
      wbank    <= 1'b0;
      dec_bank <= 1'b0;
    end else begin
      if (b_valid) begin
        widx <= wr_idx + 1'b1;
        if (b_eof) wbank <= ~wbank;
      end
      if (syn_done) dec_bank <= ~wbank;
    end
  end

  recd_data_buffer #(.M(8), .AW(IW + 1)) u_buf (
    .clk, .wr_en(b_valid), .wr_addr({wbank, wr_idx}), .wr_data(b_byte),
    .rd_en, .rd_addr({dec_bank, rd_addr}), .rd_data);

  equation_solver #(.N(N), .K(K)) u_es (
    .clk, .rst, .start(syn_done), .syn, .busy(es_busy), .done(es_done),
    .sigma, .omega, .degree);

  chien_search #(.N(N), .K(K)) u_chien (
    .clk, .rst, .start(es_done), .sigma, .degree, .busy(cs_busy), .rd_en, .rd_addr,
    .pos_valid, .pos, .root, .sig_odd, .done(cw_done), .nroots(cw_nerr), .fail(cw_fail));

  error_evaluator #(.N(N), .K(K)) u_eval (
    .clk, .rst, .start(es_done), .step(cs_busy), .omega, .pos_valid, .pos, .root,
    .sig_odd, .rx_sym(rd_data), .out_valid, .out_sym(out_byte), .out_sof, .out_eof,
    .out_corrected);

  // a new codeblock must not reach the solver while it is still busy
  property p_solver_free;
    @(posedge clk) disable iff (rst) syn_done |-> !es_busy && !cs_busy;
  endproperty
  a_solver_free: assert property (p_solver_free);
endmodule
