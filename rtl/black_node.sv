// black_node: prefix operator (G,P) o (G',P') = (G | P&G', P&P').
//
// "hi" is the more significant span, "lo" the span directly below it. The
// node is written in the alternating polarity of the circuit table:
//   EVEN = 1 (levels CM0, CM2, CM4): inputs inverted, outputs true,
//       P = NOR(~P, ~P'),  G = OAI21: ~(~G & (~P | ~G'))
//   EVEN = 0 (levels CM1, CM3, CM5): inputs true, outputs inverted,
//       ~P = NAND(P, P'),  ~G = AOI21: ~(G | P & G')
// so that each level is a single inverting gate.
//
// Interface: g_hi, p_hi, g_lo, p_lo in the input polarity; g_o, p_o in the
// output polarity. Timing: purely combinational.
module black_node #(
  parameter bit EVEN = 1'b1
) (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_o,
  output logic p_o
);

  always_comb begin
    if (EVEN) begin
      p_o = ~(p_hi | p_lo);
      g_o = ~(g_hi & (p_hi | g_lo));
    end else begin
      p_o = ~(p_hi & p_lo);
      g_o = ~(g_hi | (p_hi & g_lo));
    end
  end

endmodule
