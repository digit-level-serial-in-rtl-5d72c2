// Black prefix cell of the Brent-Kung carry tree.
// Merges a higher (group) generate/propagate pair with the adjacent lower pair:
//   G = G_hi | (P_hi & G_lo),  P = P_hi & P_lo.
// Used where the merged group does not yet reach bit 0, so its propagate is still
// needed further down the tree. Three gates, purely combinational.
module bk_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_out,
  output logic p_out
);
  assign g_out = g_hi | (p_hi & g_lo);
  assign p_out = p_hi & p_lo;
endmodule
