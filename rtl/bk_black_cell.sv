// Brent-Kung black cell: combines the (generate, propagate) pair of a higher
// group i:k with that of the adjacent lower group k-1:j and returns both the
// group generate G(i:j) = G(i:k) | P(i:k) & G(k-1:j) and the group propagate
// P(i:j) = P(i:k) & P(k-1:j). Combinational.
module bk_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g,
  output logic p
);
  always_comb begin
    g = g_hi | (p_hi & g_lo);
    p = p_hi & p_lo;
  end
endmodule
