// par_ser: parallel-to-serial converter for encoded bytes.
//
// On load the byte and two tags are captured: valid (the slot carried data)
// and is_sync (the slot belongs to the sync-marker period). The byte is then
// shifted out MSB first, one bit per clock, on ser_bit; the tags stay with
// the bits until the next load. With the divide-by-8 tick as load, each
// byte fills exactly eight cycles. MSB-first order is this design's choice
// (the document does not state a bit order).
module par_ser (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] byte_in,
  input  logic       valid_in,
  input  logic       sync_in,
  output logic       ser_bit,
  output logic       ser_valid,
  output logic       ser_sync
);
  logic [7:0] sr;
  always_ff @(posedge clk) begin
    if (rst) begin
      sr        <= '0;
      ser_valid <= 1'b0;
      ser_sync  <= 1'b0;
    end else if (load) begin
      sr        <= byte_in;
      ser_valid <= valid_in;
      ser_sync  <= sync_in;
    end else begin
      sr        <= {sr[6:0], 1'b0};
    end
  end
  assign ser_bit = sr[7];
endmodule
