// W-bit Brent-Kung parallel-prefix adder.
//
// Three stages, as in the classic parallel-prefix formulation:
//   pre-processing   p_i = a_i ^ b_i, g_i = a_i & b_i (the carry-in is folded
//                    into bit 0: g_0 |= p_0 & cin)
//   carry network    an up-sweep builds group (G,P) for aligned groups of 2, 4,
//                    8 ... bits; a down-sweep then fills in the remaining
//                    prefixes. Black cells produce (G,P), gray cells only G
//                    (used where the group reaches bit 0), everything else is a
//                    buffer (a plain wire here).
//   post-processing  s_i = p_i ^ G(i-1:0), cout = G(W-1:0).
// For W = 4 this is exactly the network of the 4-bit example: a black cell at
// bit 3 and a gray cell at bit 1 in the first level, a gray cell at bit 3 in
// the second level, a gray cell at bit 2 in the down-sweep, buffers elsewhere. W need not be a power of two: the inputs are
// padded with zeros to the next power of two internally.
// Combinational; depth 2*log2(W)-1 prefix levels.
module brent_kung_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LG = (W > 1) ? $clog2(W) : 0;
  localparam int unsigned P2 = 1 << LG;
  // number of prefix levels: LG up-sweep levels plus LG-1 down-sweep levels
  localparam int unsigned NS = (LG > 0) ? (2 * LG - 1) : 0;

  logic [P2-1:0] ap, bp;
  logic [P2-1:0] pp;   // bitwise propagate, kept for the sums
  logic [P2-1:0] gf;   // full prefix generate G(i:0) after the last level

  assign ap = P2'(a);
  assign bp = P2'(b);
  assign pp = ap ^ bp;

  // Level s of the network holds the group (generate, propagate) pair of
  // every bit. Level 0 is the pre-processing stage, levels 1 .. LG the
  // up-sweep, levels LG+1 .. NS the down-sweep.
  for (genvar s = 0; s <= NS; s++) begin : g_lvl
    logic [P2-1:0] g, p;
    if (s == 0) begin : g_pre
      // pre-processing stage, carry-in folded into bit 0
      assign g = (ap & bp) | P2'(pp[0] & cin);
      assign p = pp;
    end else if (s <= LG) begin : g_up
      // up-sweep: combine nodes 2^l apart at every (2^(l+1))-th bit
      localparam int unsigned L = s - 1;
      for (genvar i = 0; i < P2; i++) begin : g_node
        if (((i + 1) % (1 << (L + 1))) == 0) begin : g_comb
          if (i == (1 << (L + 1)) - 1) begin : g_gray
            bk_gray_cell u_cell (
              .g_hi(g_lvl[s-1].g[i]), .p_hi(g_lvl[s-1].p[i]), .g_lo(g_lvl[s-1].g[i-(1<<L)]),
              .g(g[i])
            );
            assign p[i] = g_lvl[s-1].p[i];  // not used past this point
          end else begin : g_black
            bk_black_cell u_cell (
              .g_hi(g_lvl[s-1].g[i]), .p_hi(g_lvl[s-1].p[i]),
              .g_lo(g_lvl[s-1].g[i-(1<<L)]), .p_lo(g_lvl[s-1].p[i-(1<<L)]),
              .g(g[i]), .p(p[i])
            );
          end
        end else begin : g_buf
          assign g[i] = g_lvl[s-1].g[i];
          assign p[i] = g_lvl[s-1].p[i];
        end
      end
    end else begin : g_down
      // down-sweep: fill bits 3*2^l-1 + k*2^(l+1) from the full prefix 2^l
      // below; every node touched reaches bit 0, so all are gray cells
      localparam int unsigned L = NS - s;
      for (genvar i = 0; i < P2; i++) begin : g_node
        if ((i >= 3 * (1 << L) - 1) && (((i + 1 - 3 * (1 << L)) % (1 << (L + 1))) == 0)) begin : g_gray
          bk_gray_cell u_cell (
            .g_hi(g_lvl[s-1].g[i]), .p_hi(g_lvl[s-1].p[i]), .g_lo(g_lvl[s-1].g[i-(1<<L)]),
            .g(g[i])
          );
          assign p[i] = g_lvl[s-1].p[i];
        end else begin : g_buf
          assign g[i] = g_lvl[s-1].g[i];
          assign p[i] = g_lvl[s-1].p[i];
        end
      end
    end
  end

  assign gf = g_lvl[NS].g;

  // post-processing stage
  always_comb begin
    sum[0] = pp[0] ^ cin;
    for (int i = 1; i < W; i++) sum[i] = pp[i] ^ gf[i-1];
    cout = gf[W-1];
  end
endmodule
