// csla_pkg: constants shared by the carry select adder modules.
//
// Holds the bit partition of the 16-bit square-root carry select adder:
// five groups of 2, 2, 3, 4 and 5 bits, least significant first (bits
// 1:0, 3:2, 6:4, 10:7 and 15:11). The partition is the published one; the
// helper function that turns it into bit positions is this design's own.
package csla_pkg;

  localparam int unsigned CSLA16_WIDTH   = 16;
  localparam int unsigned CSLA16_NGROUPS = 5;
  localparam int unsigned CSLA16_GW [CSLA16_NGROUPS] = '{2, 2, 3, 4, 5};

  // Least significant bit position of group g (0-based) of the 16-bit adder.
  function automatic int unsigned csla16_lsb(int unsigned g);
    int unsigned l = 0;
    for (int unsigned i = 0; i < g; i++) l += CSLA16_GW[i];
    return l;
  endfunction
endpackage
