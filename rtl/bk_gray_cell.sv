// Gray prefix cell of the Brent-Kung adder.
//
// Joins an upper span (g_hi, p_hi) with a lower span whose group generate
// g_lo is already final (it reaches bit 0, so it is the carry out of the
// lower span). Only the group generate is formed:
//     g = g_hi | (p_hi & g_lo)
// which is one AND and one OR gate. The same cell merges the carry-in into
// bit 0 (the block marked M beside P0,G0 in the 32-bit adder's diagram).
// Purely combinational, no clock.
module bk_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g
);

  assign g = g_hi | (p_hi & g_lo);

endmodule
