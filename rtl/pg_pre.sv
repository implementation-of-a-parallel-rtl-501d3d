// pg_pre: preprocessing row of the prefix adder (bit generate / propagate).
//
// For every bit i it forms G_i = A_i & B_i and P_i = A_i ^ B_i and delivers
// them inverted (g_n = ~G_i, p_n = ~P_i), the polarity in which the first
// prefix level (CM0, an even level) expects its inputs. The exclusive-OR
// propagate follows the adder equations; the inverted outputs follow the
// circuit table of the design.
//
// Interface: a, b are W-bit operand slices; g_n, p_n are W-bit, active low.
// Timing: purely combinational.
module pg_pre #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] g_n,
  output logic [W-1:0] p_n
);

  always_comb begin
    g_n = ~(a & b);
    p_n = ~(a ^ b);
  end

endmodule
