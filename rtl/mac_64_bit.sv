// mac_64_bit: unsigned multiply-accumulate unit, out <= out + a*b each clock.
//
// Three parts, as in the design's block diagram: a Vedic multiplier
// (vedic_multiplier) forms the 2N-bit product of a and b; a 2N-bit carry save
// adder (carry_save_adder) adds that product to the value fed back from the
// accumulator; the accumulator register (accumulator) stores the (2N+1)-bit
// sum, which is also the unit's output.
//
// The adder is 2N bits wide (128 for N = 64) and the accumulator 2N+1 bits
// (129), both as the design gives them. The adder sums the product and the
// low 2N bits of the accumulator into 2N+1 bits; the accumulator's top bit is
// then the exclusive-or of its old top bit and the adder's carry out. So the
// running sum is exact up to 2^(2N+1) - 1 and wraps modulo 2^(2N+1) beyond
// that; the design says nothing about overflow, and this one XOR gate is this
// implementation's way of keeping the 129th bit.
//
// Timing: the multiplier and adder are one combinational path. The a and b
// present before a rising clock edge are added in at that edge, so one
// product is accumulated per clock and shows on out right after the edge. rst
// (synchronous, active high) clears out to zero at the edge and adds nothing.
//
// Interface: clk, rst, a[N-1:0], b[N-1:0] in; out[2N:0] out. N = 64 by default.
module mac_64_bit #(
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N:0]   out
);
  localparam int unsigned PW = 2 * N;  // product and adder width

  logic [PW-1:0] product;
  logic [PW:0]   sum;       // product + out[PW-1:0], with carry out in bit PW
  logic [PW:0]   acc_next;

  vedic_multiplier #(.N(N)) u_mul (.a(a), .b(b), .q(product));

  carry_save_adder #(.WIDTH(PW)) u_add (
    .p  (product),
    .q  (out[PW-1:0]),
    .cin(1'b0),
    .sum(sum)
  );

  always_comb begin
    acc_next = {out[PW] ^ sum[PW], sum[PW-1:0]};
  end

  accumulator #(.WIDTH(PW + 1)) u_acc (
    .clk(clk),
    .rst(rst),
    .d  (acc_next),
    .q  (out)
  );
endmodule
