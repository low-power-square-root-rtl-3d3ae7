// csla_pkg: shared constants of the 16-bit square-root carry select adder.
//
// The adder is split into five groups of increasing width, least significant
// first: 2, 2, 3, 4 and 5 bits (bits 1:0, 3:2, 6:4, 10:7 and 15:11). The
// widths grow by one bit per group so that each group's result is ready at
// about the time the carry from below arrives, the "square root" partition.
// group_lsb() gives the position of a group's lowest bit.
package csla_pkg;

  localparam int unsigned N_BITS     = 16;
  localparam int unsigned NUM_GROUPS = 5;
  localparam int unsigned GROUP_W [NUM_GROUPS] = '{2, 2, 3, 4, 5};

  // Lowest bit position of group g: sum of the widths below it.
  function automatic int unsigned group_lsb(input int unsigned g);
    int unsigned pos = 0;
    for (int unsigned i = 0; i < g; i++) pos += GROUP_W[i];
    return pos;
  endfunction

endpackage
