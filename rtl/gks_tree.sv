// gks_tree: Grouped-Kogge-Stone carry tree over N columns.
//
// Each column carries the generate/propagate pair of one group of bits (a
// 2-bit sub-group inside an 8-bit group, or an 8-bit group in the top
// level). Level t (t = 1 .. log2 N) combines column k with column k - 2^(t-1),
// as in a Kogge-Stone tree, but on whole groups instead of single bits:
//   - a black node (black_node) where the combined span does not yet reach
//     column 0, so both G and P go on;
//   - a grey node (grey_node) where the span first reaches column 0: the
//     result is already the carry out of that column;
//   - an inverting buffer in columns that are already complete, so that the
//     signal keeps the polarity of its level (the buffer being an inverter
//     is this design's choice; the tree pattern itself follows the
//     grouped Kogge-Stone figures).
// Column N-1 gives the G/P of all N columns (g_all, p_all), which the next
// tree level consumes. Without the carry-in tree the group propagate is
// never needed (only the lowest group and the word as a whole use such a
// tree), so the propagate chain is not completed: column N-1 ends in a grey
// node and p_all reads 0.
//
// With CIN_TREE = 1 a second set of carries is formed for a carry-in `cin`
// entering below column 0, as the carry variant of the 8-bit prefix adder
// does. It treats the carry-in as column -1 of the same Kogge-Stone pattern
// and shares every black node whose span does not include it; only grey
// nodes and buffers are added. The nodes at column 2^t - 1, which the
// carry-in tree needs as black nodes, are then black in the shared tree too.
//
// Polarity: level t of this tree is prefix level CM(FIRST_LEVEL + t - 1).
// Inputs g_i/p_i/cin are in the polarity of level CM(FIRST_LEVEL - 1)
// (cin is given true and converted here); all outputs are in the polarity
// of the last level, see hppa_pkg::level_inverted.
//
// Outputs: c0[k] = carry out of column k with no carry-in, c1[k] = carry
// out of column k with carry-in cin (k = 0 .. N-2; c1 is all zero when
// CIN_TREE = 0). Timing: purely combinational, log2 N node levels.
module gks_tree
  import hppa_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned FIRST_LEVEL = 1,
  parameter bit          CIN_TREE    = 1'b0
) (
  input  logic [N-1:0] g_i,
  input  logic [N-1:0] p_i,
  input  logic         cin,
  output logic         g_all,
  output logic         p_all,
  output logic [N-2:0] c0,
  output logic [N-2:0] c1
);

  localparam int T = $clog2(N);

  initial begin
    assert (N >= 2 && (1 << T) == N)
      else $error("gks_tree: N must be a power of two, at least 2");
  end

  // One block per level; gi/pi/gci are the level's inputs, go/po/gco its
  // outputs. gco (carry-in tree) is meaningful only in the columns whose
  // span already includes cin; po only where a black node drives it.
  for (genvar t = 1; t <= T; t++) begin : g_lvl
    localparam int  D     = 1 << (t - 1);
    localparam int  LEVEL = int'(FIRST_LEVEL) + t - 1;
    localparam bit  EVEN  = !level_inverted(LEVEL);

    logic [N-1:0] gi, pi, gci;
    logic [N-1:0] go, po, gco;

    if (t == 1) begin : g_first
      assign gi  = g_i;
      assign pi  = p_i;
      assign gci = '0;
    end else begin : g_next
      assign gi  = g_lvl[t-1].go;
      assign pi  = g_lvl[t-1].po;
      assign gci = g_lvl[t-1].gco;
    end

    for (genvar k = 0; k < N; k++) begin : g_col
      // ---- shared tree (no carry-in) ----
      if (k < D) begin : g_buf
        // column already complete: inverting buffer keeps the level polarity
        assign go[k] = ~gi[k];
        assign po[k] = 1'b0;               // propagate no longer needed
      end else if (k < 2*D && !(CIN_TREE && (k == 2*D-1 || k == N-1))) begin : g_grey
        grey_node #(.EVEN(EVEN)) u_node (
          .g_hi(gi[k]), .p_hi(pi[k]), .g_lo(gi[k-D]),
          .g_o (go[k])
        );
        assign po[k] = 1'b0;               // propagate no longer needed
      end else begin : g_black
        black_node #(.EVEN(EVEN)) u_node (
          .g_hi(gi[k]), .p_hi(pi[k]), .g_lo(gi[k-D]), .p_lo(pi[k-D]),
          .g_o (go[k]), .p_o (po[k])
        );
      end

      // ---- carry-in tree: column -1 is cin ----
      if (CIN_TREE && k <= D - 2) begin : g_cbuf
        assign gco[k] = ~gci[k];
      end else if (CIN_TREE && k == D - 1) begin : g_ccin
        // cin in the polarity of this level's inputs
        grey_node #(.EVEN(EVEN)) u_node (
          .g_hi(gi[k]), .p_hi(pi[k]), .g_lo(level_inverted(LEVEL - 1) ? ~cin : cin),
          .g_o (gco[k])
        );
      end else if (CIN_TREE && k <= 2*D - 2) begin : g_cgrey
        grey_node #(.EVEN(EVEN)) u_node (
          .g_hi(gi[k]), .p_hi(pi[k]), .g_lo(gci[k-D]),
          .g_o (gco[k])
        );
      end else begin : g_cnone
        assign gco[k] = 1'b0;              // span does not reach cin yet
      end
    end
  end

  assign g_all = g_lvl[T].go[N-1];
  assign p_all = CIN_TREE ? g_lvl[T].po[N-1] : 1'b0;
  assign c0    = g_lvl[T].go[N-2:0];
  assign c1    = g_lvl[T].gco[N-2:0];

endmodule
