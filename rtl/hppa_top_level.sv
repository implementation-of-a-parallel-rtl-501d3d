// hppa_top_level: top level of the hyper-parallel prefix adder.
//
// Takes, from every group of the bottom level, the group generate/propagate
// and the two candidate group sums (carry-in 0 and carry-in 1). A gks_tree
// over the groups (levels CM<T+1> .. CM<T+log2 NG>, CM3 .. CM5 for eight
// 8-bit groups) forms the carry into every group. One multiplexer per group
// then picks the carry-in-1 sum when that carry is set, the carry-in-0 sum
// otherwise, as in a carry-select adder. The lowest group has no carry-in
// (the adder has none) and needs no multiplexer, so s_c starts at group 1.
// The G/P of all groups is the carry out of the word (cout).
// This structure is the one of the 64-bit design; a carry-in into the word,
// which its top-level figure sketches, is not built (the text states that
// the adder has none).
//
// Interface: g_grp/p_grp[j] group G/P in the polarity of level CM<T>
// (T = log2(GROUP_BITS/2)); s_nc[j], s_c[j] the group sums; sum, cout the
// result. Timing: purely combinational.
module hppa_top_level
  import hppa_pkg::*;
#(
  parameter int unsigned WIDTH      = DEF_WIDTH,
  parameter int unsigned GROUP_BITS = DEF_GROUP_BITS,
  localparam int unsigned NG        = WIDTH / GROUP_BITS
) (
  input  logic [NG-1:0]                 g_grp,
  input  logic [NG-1:0]                 p_grp,
  input  logic [NG-1:0][GROUP_BITS-1:0] s_nc,
  input  logic [NG-1:1][GROUP_BITS-1:0] s_c,
  output logic [WIDTH-1:0]              sum,
  output logic                          cout
);

  localparam int T_GROUP = $clog2(GROUP_BITS / SUB_BITS);   // last in-group level
  localparam int T_TOP   = $clog2(NG);
  localparam bit C_INV   = level_inverted(T_GROUP + T_TOP); // polarity of the carries

  initial begin
    assert (NG >= 2 && NG * GROUP_BITS == WIDTH)
      else $error("hppa_top_level: WIDTH must hold at least two whole groups");
  end

  logic [NG-2:0] c_grp;      // carry out of group j, into group j+1
  logic          g_word;
  logic          p_word;
  logic [NG-2:0] c_unused;

  gks_tree #(.N(NG), .FIRST_LEVEL(T_GROUP + 1), .CIN_TREE(1'b0)) u_tree (
    .g_i  (g_grp),
    .p_i  (p_grp),
    .cin  (1'b0),
    .g_all(g_word),
    .p_all(p_word),
    .c0   (c_grp),
    .c1   (c_unused)
  );

  assign sum[GROUP_BITS-1:0] = s_nc[0];
  for (genvar j = 1; j < NG; j++) begin : g_mux
    assign sum[j*GROUP_BITS +: GROUP_BITS] = (c_grp[j-1] ^ C_INV) ? s_c[j] : s_nc[j];
  end

  assign cout = g_word ^ C_INV;

endmodule
