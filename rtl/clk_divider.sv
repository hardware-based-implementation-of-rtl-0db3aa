// clk_divider: byte timing for the transmit chain.
//
// The encoder works on 8-bit symbols while the line runs one bit per clock,
// so symbol operations happen once every DIV clocks. Instead of generating
// a divided clock this block produces a one-cycle enable, tick, every DIV
// cycles of the single system clock (the document divides the board clock
// by eight; using an enable keeps the design on one clock). phase counts
// 0..DIV-1 and tick is high while phase is 0. Synchronous active-high reset
// puts phase at 0, so the first tick is the first cycle after reset.
module clk_divider #(
  parameter int DIV = 8
) (
  input  logic                   clk,
  input  logic                   rst,
  output logic                   tick,
  output logic [$clog2(DIV)-1:0] phase
);
  always_ff @(posedge clk) begin
    if (rst)                  phase <= '0;
    else if (int'(phase) == DIV - 1) phase <= '0;
    else                      phase <= phase + 1'b1;
  end
  assign tick = (phase == '0);
endmodule
