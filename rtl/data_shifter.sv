// data_shifter: serial source of the attached sync marker.
//
// A ASM_BITS-wide shift register is loaded with the marker when load is
// high and shifts one place per clock afterwards, so the marker leaves MSB
// first on asm_bit over the ASM_BITS cycles that follow the load. The
// marker value 1ACFFC1D and its 32-bit length follow the document; using a
// parallel-load shift register for the sync period is this design's reading
// of the document's one-line description.
module data_shifter
  import ccsds_pkg::*;
#(
  parameter logic [31:0] MARKER = ASM_WORD
) (
  input  logic clk,
  input  logic rst,
  input  logic load,
  output logic asm_bit
);
  logic [31:0] sr;
  always_ff @(posedge clk) begin
    if (rst)       sr <= '0;
    else if (load) sr <= MARKER;
    else           sr <= {sr[30:0], 1'b0};
  end
  assign asm_bit = sr[31];
endmodule
