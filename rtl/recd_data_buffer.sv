// recd_data_buffer: received-symbol store of the decoder.
//
// Simple dual-port memory, 2^AW words of M bits: one write port and one
// registered read port (read data one cycle after rd_en/rd_addr), the shape
// of an FPGA block RAM. The decoder uses two banks of 2^(AW-1) words so one
// codeblock can be written while the previous one is read back for
// correction. The document shows the buffer only as a block; its size and
// ports are this design's choice.
module recd_data_buffer #(
  parameter int M  = 8,
  parameter int AW = 9
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [M-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [M-1:0]  rd_data
);
  logic [M-1:0] mem [2**AW];
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
