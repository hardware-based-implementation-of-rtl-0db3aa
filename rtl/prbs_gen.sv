// prbs_gen: CCSDS pseudo-random sequence generator.
//
// Eight one-bit delays X8..X1 shift toward X1; X1 is the output and the
// new X8 is X8 ^ X6 ^ X4 ^ X1, which realises h(x) = x^8+x^7+x^5+x^3+1
// (structure of the standard's block diagram). While init is high the
// register is held at all ones, as during the sync-marker period; each
// cycle with advance high outputs X1 and shifts. The sequence starts
// FF 48 0E C0 9A ... and repeats every 255 bits. prbs_bit is combinational
// from the register, so the bit used in a cycle is the one in X1.
module prbs_gen (
  input  logic clk,
  input  logic rst,
  input  logic init,
  input  logic advance,
  output logic prbs_bit
);
  logic [8:1] x;
  always_ff @(posedge clk) begin
    if (rst || init) x <= 8'hFF;
    else if (advance) x <= {x[8] ^ x[6] ^ x[4] ^ x[1], x[8:2]};
  end
  assign prbs_bit = x[1];
endmodule
