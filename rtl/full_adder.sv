// full_adder: one-bit full adder, sum = x ^ y ^ z, carry = majority(x, y, z).
// Purely combinational; a cell of the carry save adder.
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
