// vedic_2x2: 2x2-bit unsigned multiplier, the leaf cell of the Vedic
// ("vertically and crosswise") multiplier.
//
// The product is formed in three steps: the vertical product a0*b0 gives q0;
// the two crosswise products a1*b0 and a0*b1 are added in a half adder, whose
// sum is q1; the second vertical product a1*b1 is added to that half adder's
// carry in a second half adder, giving q2 (sum) and q3 (carry). This is four
// AND gates and two half adders, as the design specifies.
//
// Interface: a[1:0], b[1:0] in, q[3:0] = a*b out. Combinational, no clock.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic p00, p10, p01, p11;  // partial products a_i & b_j
  logic c1;                  // carry of the crosswise half adder

  always_comb begin
    p00 = a[0] & b[0];
    p10 = a[1] & b[0];
    p01 = a[0] & b[1];
    p11 = a[1] & b[1];
  end

  assign q[0] = p00;

  half_adder u_ha_cross (.x(p10), .y(p01), .s(q[1]), .c(c1));
  half_adder u_ha_high  (.x(c1),  .y(p11), .s(q[2]), .c(q[3]));
endmodule
