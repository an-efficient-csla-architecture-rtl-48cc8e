// csla_pkg: constants shared by the latch-based carry select adders.
//
// The 16-bit adder is cut into five groups of 2, 2, 3, 4 and 5 bits
// (bits 1:0, 3:2, 6:4, 10:7 and 15:11). The lowest group is an ordinary
// ripple carry adder fed by the true carry input; every other group is a
// latch group (one ripple carry adder plus latches plus a select mux).
// The widths are those of the published 16-bit structure; the helper
// function that turns them into bit offsets is this design's own.
package csla_pkg;

  localparam int unsigned NUM_GROUPS = 5;

  // Width of each group, lowest group first.
  localparam int unsigned GROUP_W [NUM_GROUPS] = '{2, 2, 3, 4, 5};

  // Word size of one adder stage: the sum of GROUP_W.
  localparam int unsigned STAGE_W = 16;

  // Bit position of the least significant bit of group g.
  function automatic int unsigned group_lsb(input int unsigned g);
    int unsigned pos;
    pos = 0;
    for (int unsigned i = 0; i < g; i++) pos += GROUP_W[i];
    return pos;
  endfunction

endpackage
