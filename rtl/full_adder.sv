// One-bit full adder: s = x ^ y ^ z, c = majority(x, y, z).
// The basic cell of the carry-save rows, the ripple-carry adder and both
// bypassing multiplier arrays. Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  always_comb begin
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
  end
endmodule
