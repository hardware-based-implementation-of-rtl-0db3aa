// test_stimulus: frame sequencer and ramp data source of the transmitter.
//
// A frame is ASM_BYTES sync slots followed by an N-symbol codeword: K ramp
// message bytes and N-K parity slots. A slot counter advances on every tick
// (one symbol time) while en is high, wrapping at the frame end so frames
// follow one another back to back. For the current slot it presents:
//   sync_slot   slot lies in the sync-marker period
//   frame_first slot 0 of the frame (first sync byte)
//   sym_valid   tick in a codeword slot (the encoder takes a symbol)
//   start       first message symbol of a codeword
//   parity_sel  slot lies in the parity region (encoder shifts out parity)
//   data        ramp value, incremented after every message byte
// All outputs are combinational from the slot and ramp registers. The ramp
// test pattern, the start and parity-select controls follow the document;
// the slot layout and the ramp continuing across frames are this design's
// choices (a ramp running on across frames matches the simulation figure).
module test_stimulus #(
  parameter int M         = 8,
  parameter int N         = 255,
  parameter int K         = 223,
  parameter int ASM_BYTES = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         tick,
  output logic         sync_slot,
  output logic         frame_first,
  output logic         sym_valid,
  output logic         start,
  output logic         parity_sel,
  output logic [M-1:0] data
);
  localparam int SLOTS = ASM_BYTES + N;
  logic [$clog2(SLOTS)-1:0] slot;
  logic [M-1:0]             ramp;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot <= '0;
      ramp <= '0;
    end else if (en && tick) begin
      slot <= (int'(slot) == SLOTS - 1) ? '0 : slot + 1'b1;
      if (!sync_slot && !parity_sel) ramp <= ramp + 1'b1;
    end
  end

  assign sync_slot   = int'(slot) < ASM_BYTES;
  assign frame_first = (slot == '0);
  assign parity_sel  = int'(slot) >= ASM_BYTES + K;
  assign start       = int'(slot) == ASM_BYTES;
  assign sym_valid   = en && tick && !sync_slot;
  assign data        = ramp;
endmodule
