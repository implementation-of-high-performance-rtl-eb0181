// vedic_adder_tree: the three adders that join four half-size products into
// one full-size product at each level of the Vedic multiplier.
//
// With H-bit operand halves aH:aL and bH:bL, the inputs are the 2H-bit
// products q0 = aL*bL, q1 = aH*bL, q2 = aL*bH and q3 = aH*bH. The product is
//   q[H-1:0]  = q0[H-1:0]                            (passed straight through)
//   ADDER1    = q1 + q0[2H-1:H]                      (2H bits)
//   ADDER2    = {q3, H zeros} + {H zeros, q2}        (3H bits)
//   q[4H-1:H] = ADDER1 + ADDER2                      (ADDER3, 3H bits)
// No sum can overflow its width, since each is part of a product that fits.
// The adders are written with +; the design does not say how they are built.
//
// Interface: q0..q3 [2H-1:0] in, q[4H-1:0] out. Combinational.
module vedic_adder_tree #(
  parameter int unsigned H = 8
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] q
);
  logic [2*H-1:0] adder1;
  logic [3*H-1:0] adder2;
  logic [3*H-1:0] adder3;

  always_comb begin
    adder1 = q1 + {{H{1'b0}}, q0[2*H-1:H]};
    adder2 = {q3, {H{1'b0}}} + {{H{1'b0}}, q2};
    adder3 = {{H{1'b0}}, adder1} + adder2;
    q      = {adder3, q0[H-1:0]};
  end
endmodule
