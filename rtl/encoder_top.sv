// encoder_top: CCSDS transmit chain (baseband data simulator).
//
// Produces a continuous serial stream of frames: a 32-bit attached sync
// marker followed by an RS(N,K) codeblock that is exclusive-ORed with the
// CCSDS pseudo-random sequence. The marker is never randomized and the
// sequence restarts from all ones for every codeblock.
//
// Pipeline, one symbol every DIV (=8) clocks, all on one clock:
//   clk_divider   tick every 8 clocks
//   test_stimulus slot sequencer and ramp message bytes
//   rs_encoder    message then parity symbols, registered (one slot late)
//   par_ser       loads the encoder output on the next tick, shifts it out
//   data_shifter  shifts the marker out during the sync slots
//   prbs_gen      held at all ones in the sync period, advances per bit
//   mux2          selects marker bit or randomized codeword bit
// serial_out is registered; serial_valid is low until the first frame has
// reached the output. frame_start pulses with the first marker bit on
// serial_out. The block split follows the document's transmit modules; the
// single clock with a symbol enable replaces its divided clock.
module encoder_top
  import ccsds_pkg::*;
#(
  parameter int         N    = RS_N,
  parameter int         K    = RS_K,
  parameter int         DIV  = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic serial_out,
  output logic serial_valid,
  output logic frame_start
);
  localparam int ASM_BYTES = ASM_BITS / 8;

  logic       tick;
  logic [$clog2(DIV)-1:0] phase;
  logic       sync_slot, frame_first, sym_valid, start, parity_sel;
  logic [7:0] ramp;
  logic       enc_valid;
  logic [7:0] enc_sym;
  logic       sync_d, first_d, slot_valid_d;
  logic       ser_bit, ser_valid, ser_sync;
  logic       asm_bit, prbs_bit;
  logic       line_bit;
  logic       first_q;

  clk_divider #(.DIV(DIV)) u_div (.clk, .rst, .tick, .phase);

  test_stimulus #(.M(8), .N(N), .K(K), .ASM_BYTES(ASM_BYTES)) u_stim (
    .clk, .rst, .en, .tick, .sync_slot, .frame_first, .sym_valid, .start,
    .parity_sel, .data(ramp));

  rs_encoder #(.M(8), .N(N), .K(K)) u_enc (
    .clk, .rst, .in_valid(sym_valid), .start, .parity_sel, .in_sym(ramp),
    .out_valid(enc_valid), .out_sym(enc_sym));

  // slot tags delayed by one symbol, in step with the encoder output
  always_ff @(posedge clk) begin
    if (rst) begin
      sync_d       <= 1'b0;
      first_d      <= 1'b0;
      slot_valid_d <= 1'b0;
    end else if (tick) begin
      sync_d       <= en && sync_slot;
      first_d      <= en && frame_first;
      slot_valid_d <= en;
    end
  end

  par_ser u_ser (
    .clk, .rst, .load(tick), .byte_in(enc_sym), .valid_in(slot_valid_d),
    .sync_in(sync_d), .ser_bit, .ser_valid, .ser_sync);

  data_shifter u_asm (.clk, .rst, .load(tick && first_d), .asm_bit);

  prbs_gen u_prbs (.clk, .rst, .init(ser_sync || !ser_valid),
                   .advance(ser_valid && !ser_sync), .prbs_bit);

  mux2 #(.WIDTH(1)) u_out_sel (.a(ser_bit ^ prbs_bit), .b(asm_bit), .sel(ser_sync), .y(line_bit));

  // first bit of a marker: the cycle right after a first_d load
  always_ff @(posedge clk) begin
    if (rst) begin
      first_q      <= 1'b0;
      serial_out   <= 1'b0;
      serial_valid <= 1'b0;
      frame_start  <= 1'b0;
    end else begin
      first_q      <= tick && first_d;
      serial_out   <= line_bit;
      frame_start  <= first_q;
      if (first_q) serial_valid <= 1'b1;
    end
  end
endmodule
