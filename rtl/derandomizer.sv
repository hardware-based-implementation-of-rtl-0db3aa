// derandomizer: removes the CCSDS randomization and packs bits into bytes.
//
// Idle until sync_flag; then the N*8 bits that follow the marker (the bit
// on bit_in in the sync_flag cycle is the first) are exclusive-ORed with
// the pseudo-random sequence, which restarts from all ones at every marker,
// and packed MSB first into bytes. Each completed byte is presented for one
// cycle on out_valid/out_byte, with out_sof on the first and out_eof on the
// N-th byte of the codeblock; busy is high while a codeblock is being
// received. derand_bit shows the derandomized serial bit. The sequence and
// its restart follow the document; MSB-first packing is this design's
// choice (it matches the transmit serializer).
module derandomizer #(
  parameter int N = 255
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       bit_in,
  input  logic       sync_flag,
  output logic       busy,
  output logic       derand_bit,
  output logic       out_valid,
  output logic [7:0] out_byte,
  output logic       out_sof,
  output logic       out_eof
);
  logic [$clog2(N*8+1)-1:0] bit_cnt;
  logic [7:0]               sr;
  logic                     active;
  logic                     prbs_bit;
  logic                     starting;

  assign starting = !busy && sync_flag;
  assign active   = busy || starting;

  prbs_gen u_prbs (.clk, .rst, .init(!active), .advance(active), .prbs_bit);

  assign derand_bit = bit_in ^ prbs_bit;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      bit_cnt   <= '0;
      sr        <= '0;
      out_valid <= 1'b0;
      out_byte  <= '0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      if (active) begin
        sr <= {sr[6:0], derand_bit};
        if (bit_cnt[2:0] == 3'd7) begin
          out_valid <= 1'b1;
          out_byte  <= {sr[6:0], derand_bit};
          out_sof   <= (bit_cnt == 7);
          out_eof   <= (int'(bit_cnt) == N*8 - 1);
        end
        if (int'(bit_cnt) == N*8 - 1) begin
          busy    <= 1'b0;
          bit_cnt <= '0;
        end else begin
          busy    <= 1'b1;
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
  end
endmodule
