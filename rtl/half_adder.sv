// half_adder: one-bit half adder, sum = x ^ y, carry = x & y.
// Purely combinational. It is the cell the 2x2 multiplier and the carry save
// adder are drawn with.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  always_comb begin
    s = x ^ y;
    c = x & y;
  end
endmodule
