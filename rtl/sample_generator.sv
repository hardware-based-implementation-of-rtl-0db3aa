// sample_generator: AXI4-Stream ramp source for the data acquisition path.
//
// Stands in for the decoded satellite data in front of the AXI DMA (S2MM
// channel). While en is high a 32-bit counter supplies a ramp 0, 1, 2, ...;
// while axi_en is also high the word is offered on m_axis_tdata with
// m_axis_tvalid, and it advances on every handshake (tvalid && tready).
// m_axis_tlast marks every frame_size-th word, ending one DMA packet, and
// the next packet continues the ramp. Dropping en resets the ramp and the
// packet position. Data is held stable while tvalid is high and tready low.
// Ports Frame_Size, En, Axi_En and the stream master follow the document's
// block diagram; the roles of en and axi_en, the ramp restart and tlast
// placement are this design's reading (the document's DMA test shows a
// ramp 0..7FFF filling a 0x20000-byte buffer).
module sample_generator #(
  parameter int DATA_W = 32
) (
  input  logic              aclk,
  input  logic              aresetn,
  input  logic [31:0]       frame_size,
  input  logic              en,
  input  logic              axi_en,
  output logic [DATA_W-1:0] m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast
);
  logic [31:0] word_idx;

  assign m_axis_tvalid = en && axi_en;
  assign m_axis_tlast  = (word_idx == frame_size - 1);

  always_ff @(posedge aclk) begin
    if (!aresetn || !en) begin
      m_axis_tdata <= '0;
      word_idx     <= '0;
    end else if (m_axis_tvalid && m_axis_tready) begin
      m_axis_tdata <= m_axis_tdata + 1'b1;
      word_idx     <= m_axis_tlast ? '0 : word_idx + 1'b1;
    end
  end

  a_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    m_axis_tvalid && !m_axis_tready && $past(en) && en |=> $stable(m_axis_tdata) || !m_axis_tvalid);
endmodule
