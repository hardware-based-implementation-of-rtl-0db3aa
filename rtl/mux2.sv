// mux2: parametric two-input multiplexer.
//
// Used wherever the data path switches between two sources: the encoder's
// output switch (message symbol or parity symbol), its feedback gate
// (feedback or zero) and the transmit output switch (sync marker or
// randomized codeword bit). Purely combinational: y = sel ? b : a.
// The width parameter is this design's choice; the document only says the
// multiplexer is parametric.
module mux2 #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  always_comb y = sel ? b : a;
endmodule
