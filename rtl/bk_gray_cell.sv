// Brent-Kung gray cell: like the black cell but returns only the group
// generate G(i:j) = G(i:k) | P(i:k) & G(k-1:j). It is used where the lower
// group already reaches bit 0, so the result is a carry and no group
// propagate is needed any more. Combinational.
module bk_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g
);
  assign g = g_hi | (p_hi & g_lo);
endmodule
