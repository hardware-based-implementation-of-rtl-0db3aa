// ccsds_top: the complete CCSDS baseband test system.
//
// The transmit chain (encoder_top) produces marker-framed, RS(255,223)
// encoded and randomized frames from a ramp; its serial output is looped
// into the receive chain (decoder_top) through a channel that flips the
// line bit while chan_err is high, so errors can be injected. The decoder
// finds the marker, derandomizes, corrects and delivers the message bytes.
// Alongside sits the data acquisition source (sample_generator), whose
// AXI4-Stream master and GPIO-driven controls are brought out as ports: the
// AXI DMA, GPIO, interconnect and processing system that surround it are
// not part of this RTL. The loop from encoder to decoder mirrors the
// document's combined transmit/receive schematic, which also brings the
// derandomized serial stream out (rx_derand_bit).
module ccsds_top
  import ccsds_pkg::*;
#(
  parameter int N = RS_N,
  parameter int K = RS_K
) (
  input  logic        clk,
  input  logic        rst,
  // transmit / channel
  input  logic        tx_en,
  input  logic        chan_err,
  output logic        tx_serial_out,
  output logic        tx_serial_valid,
  output logic        tx_frame_start,
  // receive
  output logic        rx_sync_flag,
  output logic        rx_derand_bit,
  output logic        rx_syn_nonzero,
  output logic        rx_valid,
  output logic [7:0]  rx_byte,
  output logic        rx_sof,
  output logic        rx_eof,
  output logic        rx_corrected,
  output logic        rx_cw_done,
  output logic        rx_cw_fail,
  output logic [5:0]  rx_cw_nerr,
  // data acquisition stream (to AXI DMA S2MM), controls from AXI GPIO
  input  logic        daq_aresetn,
  input  logic [31:0] daq_frame_size,
  input  logic        daq_en,
  input  logic        daq_axi_en,
  output logic [31:0] daq_tdata,
  output logic        daq_tvalid,
  input  logic        daq_tready,
  output logic        daq_tlast
);
  logic line_bit;

  encoder_top #(.N(N), .K(K)) u_tx (
    .clk, .rst, .en(tx_en), .serial_out(tx_serial_out),
    .serial_valid(tx_serial_valid), .frame_start(tx_frame_start));

  assign line_bit = tx_serial_out ^ chan_err;

  decoder_top #(.N(N), .K(K)) u_rx (
    .clk, .rst, .serial_in(line_bit), .sync_flag(rx_sync_flag), .derand_bit(rx_derand_bit),
    .syn_nonzero(rx_syn_nonzero), .out_valid(rx_valid), .out_byte(rx_byte),
    .out_sof(rx_sof), .out_eof(rx_eof), .out_corrected(rx_corrected),
    .cw_done(rx_cw_done), .cw_fail(rx_cw_fail), .cw_nerr(rx_cw_nerr));

  sample_generator #(.DATA_W(32)) u_daq (
    .aclk(clk), .aresetn(daq_aresetn), .frame_size(daq_frame_size), .en(daq_en),
    .axi_en(daq_axi_en), .m_axis_tdata(daq_tdata), .m_axis_tvalid(daq_tvalid),
    .m_axis_tready(daq_tready), .m_axis_tlast(daq_tlast));
endmodule
