// hppa64: 64-bit hyper-parallel prefix adder (sum = a + b, carry out).
//
// The addition is done on two levels, both parallel prefix adders. The
// operands are cut into WIDTH/GROUP_BITS groups (eight 8-bit groups). In the
// bottom level every group, independently and at the same time, computes
// its group generate/propagate and its sum for both possible carries into
// the group (group_ppa; the lowest group only for carry 0, since the adder
// has no carry-in). In the top level a Grouped-Kogge-Stone tree over the
// group G/P finds the real carry into every group and a multiplexer per
// group selects the matching sum (hppa_top_level). Only one prefix node per
// group enters the top-level tree, so its wires are an eighth as long as a
// bit-level Kogge-Stone tree's.
// Counting prefix levels from the sub-group level: CM0 .. CM2 lie inside
// the groups, CM3 .. CM5 in the top level.
// Word width, group size and sub-group size follow the 64-bit design; other
// power-of-two group sizes (for instance GROUP_BITS = 4) also elaborate.
//
// Interface: a, b operands; sum = (a + b) mod 2^WIDTH; cout = carry out of
// bit WIDTH-1. No clock and no reset: the adder is purely combinational.
module hppa64
  import hppa_pkg::*;
#(
  parameter int unsigned WIDTH      = DEF_WIDTH,
  parameter int unsigned GROUP_BITS = DEF_GROUP_BITS
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NG = WIDTH / GROUP_BITS;

  logic [NG-1:0]                 g_grp, p_grp;
  logic [NG-1:0][GROUP_BITS-1:0] s_nc;
  logic [NG-1:1][GROUP_BITS-1:0] s_c;

  // ---- bottom level: one prefix adder pair per group ----
  for (genvar j = 0; j < NG; j++) begin : g_grp_ppa
    localparam int unsigned LO = j * GROUP_BITS;
    if (j == 0) begin : g_lowest
      logic [GROUP_BITS-1:0] s_c_none;   // lowest group has no carry variant
      group_ppa #(.GROUP_BITS(GROUP_BITS), .WITH_CARRY(1'b0)) u_ppa (
        .a(a[LO +: GROUP_BITS]), .b(b[LO +: GROUP_BITS]),
        .g_grp(g_grp[j]), .p_grp(p_grp[j]), .s_nc(s_nc[j]), .s_c(s_c_none)
      );
    end else begin : g_upper
      group_ppa #(.GROUP_BITS(GROUP_BITS), .WITH_CARRY(1'b1)) u_ppa (
        .a(a[LO +: GROUP_BITS]), .b(b[LO +: GROUP_BITS]),
        .g_grp(g_grp[j]), .p_grp(p_grp[j]), .s_nc(s_nc[j]), .s_c(s_c[j])
      );
    end
  end

  // ---- top level: group carries and sum selection ----
  hppa_top_level #(.WIDTH(WIDTH), .GROUP_BITS(GROUP_BITS)) u_top (
    .g_grp(g_grp), .p_grp(p_grp), .s_nc(s_nc), .s_c(s_c), .sum(sum), .cout(cout)
  );

endmodule
