// hppa_pkg: shared constants and helpers of the hyper-parallel prefix adder.
//
// The adder is split into groups (GROUP_BITS wide) and each group into 2-bit
// sub-groups. The prefix levels are numbered CM0, CM1, ... from the sub-group
// level upwards, across the group boundary into the top-level tree. Every
// level inverts the polarity of the generate/propagate signals it passes on:
// the preprocessing cells deliver inverted G/P, even levels (CM0, CM2, CM4)
// take inverted inputs and deliver true outputs, odd levels (CM1, CM3, CM5)
// take true inputs and deliver inverted outputs. level_inverted() tells in
// which polarity the outputs of a level are, so that every consumer can
// undo it where a true value is needed (multiplexer selects, carry out).
// The default sizes (64-bit word, 8-bit groups, 2-bit sub-groups) are the
// ones of the 64-bit design; the polarity scheme is the one of the circuit
// table of that design.
package hppa_pkg;

  // Default word and group sizes of the 64-bit adder.
  localparam int unsigned DEF_WIDTH      = 64;
  localparam int unsigned DEF_GROUP_BITS = 8;
  // Sub-groups are 2-bit carry-ripple adders; the sub-group prefix (CM0)
  // is a single prefix node per sub-group.
  localparam int unsigned SUB_BITS       = 2;

  // Output polarity of prefix level CM<level>; level -1 is the
  // preprocessing (P&G) row. True when that level's outputs are inverted.
  function automatic bit level_inverted(int level);
    return (level % 2) != 0;
  endfunction

  // Number of Kogge-Stone levels needed to span n columns.
  function automatic int unsigned tree_levels(int unsigned n);
    return $clog2(n);
  endfunction

endpackage
