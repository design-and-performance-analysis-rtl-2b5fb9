// Three-operand carry-save adder: sum = x + y + z.
//
// A row of W full adders reduces the three operands to a sum vector s and a
// carry vector c with x + y + z = s + 2c. Bit 0 of the result is s[0]; the
// remaining bits come from a merging adder that adds c to s >> 1. With
// FINAL = ADDER_CSA the merging adder is a ripple-carry adder, as in the
// 4-bit example of a full-adder row over a 4-bit ripple-carry adder; with
// FINAL = ADDER_BKA it is the Brent-Kung adder instead, which is how the
// Brent-Kung variants of the multipliers use it. The result is W+2 bits
// wide, so it never overflows. Combinational.
module carry_save_adder
  import aam_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter adder_e      FINAL = ADDER_CSA
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W+1:0] sum
);
  logic [W-1:0] s, c;
  logic [W-1:0] merge;
  logic         merge_cout;

  // carry-save row
  for (genvar i = 0; i < W; i++) begin : g_row
    full_adder u_fa (.x(x[i]), .y(y[i]), .z(z[i]), .s(s[i]), .c(c[i]));
  end

  // merging adder: c (weights 1..W) plus s[W-1:1] (weights 1..W-1)
  if (FINAL == ADDER_BKA) begin : g_bka
    brent_kung_adder #(.W(W)) u_merge (
      .a(c), .b(W'(s >> 1)), .cin(1'b0), .sum(merge), .cout(merge_cout)
    );
  end else begin : g_rca
    ripple_carry_adder #(.W(W)) u_merge (
      .a(c), .b(W'(s >> 1)), .cin(1'b0), .sum(merge), .cout(merge_cout)
    );
  end

  assign sum = {merge_cout, merge, s[0]};
endmodule
