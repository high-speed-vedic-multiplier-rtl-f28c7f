// Shared constants of the modified carry select adder (MCSA) multiplier.
//
// The final adder of the MCSA is cut into carry select groups of
// CSLA_GROUP bits (4, as drawn for the design's ripple carry adders and
// basic blocks).  csla_groups() gives how many groups cover a given width;
// when the width is not a multiple of the group size the last group is
// narrower (a choice of this implementation, needed only when the adder is
// widened beyond the 16-bit operands of the design).  All logic is
// combinational: there is no clock, reset or handshake anywhere.
package mcsa_pkg;

  localparam int unsigned CSLA_GROUP = 4;

  // Number of operands the MCSA adds, and so the multiplier width M.
  localparam int unsigned NUM_OPERANDS = 5;

  function automatic int unsigned csla_groups(input int unsigned width);
    return (width + CSLA_GROUP - 1) / CSLA_GROUP;
  endfunction

  // Width of group g (0 = least significant) of a width-bit adder.
  function automatic int unsigned csla_group_width(input int unsigned width,
                                                   input int unsigned g);
    int unsigned rest;
    rest = width - g * CSLA_GROUP;
    return (rest < CSLA_GROUP) ? rest : CSLA_GROUP;
  endfunction

endpackage
