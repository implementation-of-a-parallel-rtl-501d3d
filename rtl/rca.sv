// rca: W-bit carry-ripple adder of one sub-group.
//
// The carry enters at bit 0 and ripples through one full-adder stage per
// bit: s_i = a_i ^ b_i ^ c_i, c_(i+1) = a_i & b_i | (a_i ^ b_i) & c_i.
// Each 2-bit sub-group of the design has two of these, one with carry-in 0
// and one with carry-in 1; a multiplexer driven by the prefix tree picks
// one of the two sums. No carry-out is provided: the prefix tree supplies
// every carry the adder uses.
//
// Interface: a, b W-bit operand slices, cin carry into bit 0, s W-bit sum.
// Timing: purely combinational.
module rca #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s
);

  always_comb begin
    logic carry;
    carry = cin;
    for (int i = 0; i < W; i++) begin
      s[i]  = a[i] ^ b[i] ^ carry;
      carry = (a[i] & b[i]) | ((a[i] ^ b[i]) & carry);
    end
  end

endmodule
