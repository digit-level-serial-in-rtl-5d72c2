// Gray prefix cell of the Brent-Kung carry tree.
// Produces only the group generate G = G_hi | (P_hi & G_lo). It is used where the
// merged group reaches bit 0 (or the carry input), so its G is the final carry out of
// that bit and no propagate term is needed any more. Two gates, purely combinational.
module bk_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g_out
);
  assign g_out = g_hi | (p_hi & g_lo);
endmodule
