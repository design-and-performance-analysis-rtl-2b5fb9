// N x N unsigned column-bypassing array multiplier, p = a * b.
//
// The array is a carry-save (Braun) array. Cell (i, j) adds the partial
// product a_i & b_j, the sum from cell (i+1, j-1) and the carry from cell
// (i, j-1); all three have weight 2^(i+j). Every cell on the line of
// multiplicand bit a_i is enabled by a_i: when a_i = 0 its inputs are isolated
// (forced to 0, the two-state equivalent of the tri-state gates that keep the
// adder from switching) and a multiplexer passes the incoming sum straight
// on. Because the first row starts with no carries, every carry on a disabled
// line is zero, so the bypass is exact. The carries leaving the bypassed rows
// are ANDed with a_i before the last row, which clears any carry a disabled
// adder might leave behind.
// Row 0 is just the partial products a & b_0. Rows 1 .. N-2 are the bypassable
// cells; product bit j is the sum of cell (0, j). The last row together with
// the merge of sums and carries is one carry_save_adder (ripple-carry merge for
// FINAL = ADDER_CSA, Brent-Kung merge for FINAL = ADDER_BKA); it yields product
// bits N-1 .. 2N-1. Combinational. Many zeros in a shorten the active paths,
// which is what the adaptive hold logic exploits.
module column_bypass_multiplier
  import aam_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter adder_e      FINAL = ADDER_BKA
) (
  input  logic [N-1:0]   a,  // multiplicand (md), its bits enable the columns
  input  logic [N-1:0]   b,  // multiplier (mr)
  output logic [2*N-1:0] p
);
  // sum and carry of every cell of rows 0 .. N-2
  logic [N-1:0] s [N-1];
  logic [N-1:0] c [N-1];

  assign s[0] = a & {N{b[0]}};
  assign c[0] = '0;
  assign p[0] = s[0][0];

  for (genvar j = 1; j <= N - 2; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_cell
      logic en, x, y, z, fs, fc;
      assign en = a[i];
      // isolated inputs of the cell
      assign x  = en & a[i] & b[j];
      assign y  = en & ((i < N - 1) ? s[j-1][(i < N - 1) ? i + 1 : i] : 1'b0);
      assign z  = en & c[j-1][i];
      full_adder u_fa (.x(x), .y(y), .z(z), .s(fs), .c(fc));
      // bypass multiplexer on the sum
      assign s[j][i] = en ? fs : ((i < N - 1) ? s[j-1][(i < N - 1) ? i + 1 : i] : 1'b0);
      assign c[j][i] = fc;
    end
    assign p[j] = s[j][0];
  end

  // last row and merge
  logic [N-1:0] last_pp, last_s, last_c;
  logic [N+1:0] last_sum;

  assign last_pp = a & {N{b[N-1]}};
  assign last_s  = s[N-2] >> 1;
  assign last_c  = c[N-2] & a;  // AND gates that clear carries of disabled columns

  carry_save_adder #(.W(N), .FINAL(FINAL)) u_last (
    .x(last_pp), .y(last_s), .z(last_c), .sum(last_sum)
  );

  assign p[2*N-1:N-1] = last_sum[N:0];
endmodule
