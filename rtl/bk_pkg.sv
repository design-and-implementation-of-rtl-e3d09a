// Shared constants of the Brent-Kung adder family.
//
// ADDER_WIDTH is the operand width of the adder (32 bits). The square-root
// carry-select adder splits its operands into groups whose sizes grow from
// the least significant end; CSLA_GROUP lists them, least significant first.
// The sizes 2,2,3,4,5,6,10 (sum 32) are this design's choice: the grouping
// idea (square root) is the design's, the exact sizes are not specified.
package bk_pkg;

  localparam int unsigned ADDER_WIDTH = 32;

  localparam int unsigned CSLA_NGROUPS = 7;
  localparam int unsigned CSLA_GROUP [CSLA_NGROUPS] = '{2, 2, 3, 4, 5, 6, 10};

  // Bit position of the least significant bit of group k.
  function automatic int unsigned csla_offset(int unsigned k);
    int unsigned off = 0;
    for (int unsigned i = 0; i < k; i++) off += CSLA_GROUP[i];
    return off;
  endfunction

  // Total width covered by all groups.
  function automatic int unsigned csla_total();
    return csla_offset(CSLA_NGROUPS);
  endfunction

endpackage
