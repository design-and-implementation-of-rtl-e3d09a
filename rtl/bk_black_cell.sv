// Black prefix cell of the Brent-Kung adder.
//
// Joins an upper span (g_hi, p_hi) with the adjacent lower span
// (g_lo, p_lo) into one span:
//     g = g_hi | (p_hi & g_lo)      group generate
//     p = p_hi & p_lo               group propagate
// i.e. two AND gates and one OR gate. Used wherever the joined span does
// not yet reach bit 0, so its propagate is still needed further down the
// tree. Purely combinational, no clock.
module bk_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g,
  output logic p
);

  assign g = g_hi | (p_hi & g_lo);
  assign p = p_hi & p_lo;

endmodule
