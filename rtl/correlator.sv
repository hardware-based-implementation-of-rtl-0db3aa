// correlator: attached-sync-marker detector (digital correlator).
//
// The last ASM_BITS received bits are kept in a shift register. Each cycle
// the register, updated with the incoming bit, is compared with the marker
// and the agreeing bits are counted; when at least THRESHOLD agree (29 of
// 32 in the document) and search is high, sync_flag is raised for one
// cycle. sync_flag is registered, so in the cycle it is high the bit on
// bit_in is the first bit after the marker. The match count tolerates up to
// ASM_BITS-THRESHOLD bit errors in the marker. One bit is taken per clock;
// the search input (used to blank the search while a frame is being
// received) is this design's addition.
module correlator
  import ccsds_pkg::*;
#(
  parameter logic [31:0] MARKER    = ASM_WORD,
  parameter int          THRESHOLD = ASM_THRESHOLD
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_in,
  input  logic       search,
  output logic       sync_flag,
  output logic [5:0] match_count
);
  logic [31:0] sr, sr_next;

  always_comb begin
    sr_next     = {sr[30:0], bit_in};
    match_count = '0;
    for (int i = 0; i < 32; i++)
      match_count = match_count + {5'b0, sr_next[i] ~^ MARKER[i]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sr        <= '0;
      sync_flag <= 1'b0;
    end else begin
      sr        <= sr_next;
      sync_flag <= search && (int'(match_count) >= THRESHOLD);
    end
  end
endmodule
