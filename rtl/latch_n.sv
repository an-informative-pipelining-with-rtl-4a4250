// latch_n: negative-phase transparent latch, WIDTH bits.
//
// Transparent while clk is low, opaque while clk is high. Placed in the
// middle of a pipeline stage's logic, it stops a short path started by the
// rising edge from reaching the next Razor flip-flop before the falling
// edge, so that flip-flop's D never moves during the high phase in a correct
// run: the Razor minimum-delay constraint holds by construction. Which logic
// it splits is chosen per stage by the instantiating module.
// Circuit warnings: the latch is intended.
module latch_n #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_latch begin
    if (!clk) q = d;
  end
endmodule
