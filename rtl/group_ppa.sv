// group_ppa: bottom level of the hyper-parallel prefix adder, one group.
//
// A GROUP_BITS-wide slice of both operands is added twice at once: once for
// a carry into the group of 0 (the "non-carry" prefix adder) and once for a
// carry of 1 (the "carry" prefix adder). Both are parallel prefix adders on
// 2-bit sub-groups, and they share every prefix node they have in common:
//   - pg_pre forms the bit G/P (inverted polarity);
//   - CM0: one node per sub-group merges its two bits into a sub-group G/P;
//   - CM1 .. CM<T>: a gks_tree over the GROUP_BITS/2 sub-groups gives the
//     carry into every sub-group, both without and with the carry-in, and
//     the G/P of the whole group (T = log2(GROUP_BITS/2); 2 for 8-bit groups);
//   - every sub-group has two 2-bit carry-ripple adders (carry-in 0 and 1),
//     and a multiplexer per variant picks one of them with the carry from
//     the tree. The lowest sub-group needs no multiplexer: its carry is the
//     group's assumed carry-in.
// The lowest group of the word has no carry-in and needs only the non-carry
// adder: WITH_CARRY = 0 leaves the carry variant out (s_c then reads 0)
// and with it the group propagate, which nothing uses there (p_grp reads 0).
// The 8-bit group made of 2-bit sub-groups follows the 64-bit design; the
// polarity-alternating gates and the shared-node arrangement follow its
// figures and circuit table.
//
// Interface: a, b operand slices; g_grp/p_grp group generate/propagate in
// the polarity of level CM<T> (true for 8-bit groups); s_nc sum for carry-in
// 0; s_c sum for carry-in 1. Timing: purely combinational.
module group_ppa
  import hppa_pkg::*;
#(
  parameter int unsigned GROUP_BITS = DEF_GROUP_BITS,
  parameter bit          WITH_CARRY = 1'b1
) (
  input  logic [GROUP_BITS-1:0] a,
  input  logic [GROUP_BITS-1:0] b,
  output logic                  g_grp,
  output logic                  p_grp,
  output logic [GROUP_BITS-1:0] s_nc,
  output logic [GROUP_BITS-1:0] s_c
);

  localparam int unsigned NSUB = GROUP_BITS / SUB_BITS;
  localparam int          T    = $clog2(NSUB);
  // polarity of the carries leaving the last in-group level
  localparam bit          C_INV = level_inverted(T);

  initial begin
    assert (NSUB >= 2 && NSUB * SUB_BITS == GROUP_BITS)
      else $error("group_ppa: GROUP_BITS must be a multiple of 2, at least 4");
  end

  // ---- preprocessing ----
  logic [GROUP_BITS-1:0] g_n, p_n;
  pg_pre #(.W(GROUP_BITS)) u_pg (.a(a), .b(b), .g_n(g_n), .p_n(p_n));

  // ---- CM0: sub-group G/P (even level: inverted in, true out) ----
  logic [NSUB-1:0] sg_g, sg_p;
  for (genvar k = 0; k < NSUB; k++) begin : g_cm0
    if (k == 0 && !WITH_CARRY) begin : g_grey
      // lowest sub-group of a group without carry-in: only its carry is used
      grey_node #(.EVEN(1'b1)) u_node (
        .g_hi(g_n[2*k+1]), .p_hi(p_n[2*k+1]), .g_lo(g_n[2*k]), .g_o(sg_g[k])
      );
      assign sg_p[k] = 1'b0;
    end else begin : g_black
      black_node #(.EVEN(1'b1)) u_node (
        .g_hi(g_n[2*k+1]), .p_hi(p_n[2*k+1]), .g_lo(g_n[2*k]), .p_lo(p_n[2*k]),
        .g_o (sg_g[k]),    .p_o (sg_p[k])
      );
    end
  end

  // ---- CM1 .. CM<T>: carries into the sub-groups ----
  logic [NSUB-2:0] c_nc, c_c;
  gks_tree #(.N(NSUB), .FIRST_LEVEL(1), .CIN_TREE(WITH_CARRY)) u_tree (
    .g_i  (sg_g),
    .p_i  (sg_p),
    .cin  (1'b1),          // the carry variant assumes a carry into the group
    .g_all(g_grp),
    .p_all(p_grp),
    .c0   (c_nc),
    .c1   (c_c)
  );

  // ---- sub-group adders and sum multiplexers ----
  for (genvar k = 0; k < NSUB; k++) begin : g_sub
    localparam int unsigned LO = SUB_BITS * k;
    logic [SUB_BITS-1:0] sum0, sum1;

    rca #(.W(SUB_BITS)) u_rca0 (
      .a(a[LO +: SUB_BITS]), .b(b[LO +: SUB_BITS]), .cin(1'b0), .s(sum0)
    );

    if (k == 0) begin : g_low
      assign s_nc[LO +: SUB_BITS] = sum0;
      if (WITH_CARRY) begin : g_c
        rca #(.W(SUB_BITS)) u_rca1 (
          .a(a[LO +: SUB_BITS]), .b(b[LO +: SUB_BITS]), .cin(1'b1), .s(sum1)
        );
        assign s_c[LO +: SUB_BITS] = sum1;
      end else begin : g_nc
        assign sum1 = '0;
        assign s_c[LO +: SUB_BITS] = '0;
      end
    end else begin : g_mux
      rca #(.W(SUB_BITS)) u_rca1 (
        .a(a[LO +: SUB_BITS]), .b(b[LO +: SUB_BITS]), .cin(1'b1), .s(sum1)
      );
      assign s_nc[LO +: SUB_BITS] = (c_nc[k-1] ^ C_INV) ? sum1 : sum0;
      if (WITH_CARRY) begin : g_c
        assign s_c[LO +: SUB_BITS] = (c_c[k-1] ^ C_INV) ? sum1 : sum0;
      end else begin : g_nc
        assign s_c[LO +: SUB_BITS] = '0;
      end
    end
  end

endmodule
