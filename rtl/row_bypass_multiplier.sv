// N x N unsigned row-bypassing array multiplier, p = a * b.
//
// The partial sum is kept in carry-save form as two 2N-bit vectors, a sum
// vector S and a carry vector C, each bit at its absolute weight. Row 0 loads
// S = a & b_0. Row j (1 .. N-2) is a row of full adders that adds the shifted
// partial product (a & b_j) << j to S and C; it is enabled by multiplier bit
// b_j. When b_j = 0 the row's adder inputs are isolated (forced to 0, the
// two-state equivalent of the tri-state gates) and multiplexers pass the
// previous S and C through unchanged, so the previous sum becomes the present
// sum. Keeping the vectors at absolute weights is what makes passing both S
// and C through a disabled row exact.
// The last row and the merge of S and C form one carry_save_adder
// (ripple-carry merge for FINAL = ADDER_CSA, Brent-Kung merge for
// FINAL = ADDER_BKA). Combinational. Many zeros in b shorten the active paths,
// which is what the adaptive hold logic exploits.
module row_bypass_multiplier
  import aam_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter adder_e      FINAL = ADDER_BKA
) (
  input  logic [N-1:0]   a,  // multiplicand (md)
  input  logic [N-1:0]   b,  // multiplier (mr), its bits enable the rows
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2 * N;

  logic [W-1:0] s [N-1];
  logic [W-1:0] c [N-1];

  assign s[0] = W'(a & {N{b[0]}});
  assign c[0] = '0;

  for (genvar j = 1; j <= N - 2; j++) begin : g_row
    logic         en;
    logic [W-1:0] x, y, z, fs, fc;
    assign en = b[j];
    // isolated inputs of the row
    assign x = {W{en}} & (W'(a) << j);
    assign y = {W{en}} & s[j-1];
    assign z = {W{en}} & c[j-1];
    for (genvar i = 0; i < W; i++) begin : g_cell
      full_adder u_fa (.x(x[i]), .y(y[i]), .z(z[i]), .s(fs[i]), .c(fc[i]));
    end
    // bypass multiplexers on sum and carry
    assign s[j] = en ? fs : s[j-1];
    assign c[j] = en ? (fc << 1) : c[j-1];
  end

  // last row and merge
  logic [W-1:0] last_pp;
  logic [W+1:0] last_sum;

  assign last_pp = W'(a & {N{b[N-1]}}) << (N - 1);

  carry_save_adder #(.W(W), .FINAL(FINAL)) u_last (
    .x(last_pp), .y(s[N-2]), .z(c[N-2]), .sum(last_sum)
  );

  assign p = last_sum[W-1:0];
endmodule
