// W-bit ripple-carry adder: a chain of full adders, the carry of bit i feeding
// bit i+1. It is the merging stage of the carry-save adder (the "ripple carry
// adder 4-bit" under the full-adder row). Combinational, W full-adder delays
// on the longest path.
module ripple_carry_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.x(a[i]), .y(b[i]), .z(c[i]), .s(sum[i]), .c(c[i+1]));
  end

  assign cout = c[W];
endmodule
