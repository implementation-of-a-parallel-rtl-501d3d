// grey_node: generate-only prefix operator, G | P & G'.
//
// Used where the span of a prefix reaches the lowest column (or the
// carry-in): from there on only the carry (the group generate) is needed,
// so the propagate half of the black node is dropped. Polarity as in
// black_node:
//   EVEN = 1: inputs inverted, output true,     G = ~(~G & (~P | ~G'))
//   EVEN = 0: inputs true,     output inverted, ~G = ~(G | P & G')
//
// Interface: g_hi, p_hi, g_lo in the input polarity; g_o in the output
// polarity. Timing: purely combinational.
module grey_node #(
  parameter bit EVEN = 1'b1
) (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g_o
);

  always_comb begin
    if (EVEN) g_o = ~(g_hi & (p_hi | g_lo));
    else      g_o = ~(g_hi | (p_hi & g_lo));
  end

endmodule
