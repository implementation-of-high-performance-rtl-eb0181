// carry_save_adder: adds two WIDTH-bit unsigned numbers and a carry in,
// giving a WIDTH+1-bit sum, in the two-row structure this design uses.
//
// Row 1 works on every bit position in parallel: bit 0 is a full adder that
// also takes cin; every other bit is a half adder giving the saved sum
// S_i = p_i ^ q_i and the saved carry C_i = p_i & q_i (d_{i+1} below, already
// moved one place up). Row 2 merges the saved sums and carries: bit 0 of the
// result is row 1's bit-0 sum; bit 1 is a half adder (no carry enters it);
// bits 2..WIDTH-1 are full adders chained by their carries; the top bit is the
// exclusive-or of the last saved carry and the last chain carry (the two can
// never both be 1, so the final half adder's carry out is always 0 and is not
// built).
//
// The reference drawing of the 8-bit case alternates half and full adders in
// row 2; a half adder there would have three inputs to add, so every row-2
// position that receives a chain carry is a full adder here.
//
// Interface: p, q [WIDTH-1:0], cin in; sum[WIDTH:0] = p + q + cin out.
// Combinational. WIDTH must be 2 or more.
module carry_save_adder #(
  parameter int unsigned WIDTH = 128
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] q,
  input  logic             cin,
  output logic [WIDTH:0]   sum
);
  logic [WIDTH-1:0] s;  // row-1 saved sums
  logic [WIDTH:0]   d;  // row-1 saved carries, d[i] comes from bit i-1
  logic [WIDTH:0]   c;  // row-2 chain carries, c[i] enters bit i

  assign d[0] = 1'b0;
  assign c[0] = 1'b0;
  assign c[1] = 1'b0;

  // Row 1
  full_adder u_r1_fa0 (.x(p[0]), .y(q[0]), .z(cin), .s(s[0]), .c(d[1]));
  for (genvar i = 1; i < WIDTH; i++) begin : g_row1
    half_adder u_ha (.x(p[i]), .y(q[i]), .s(s[i]), .c(d[i+1]));
  end

  // Row 2
  assign sum[0] = s[0];
  half_adder u_r2_ha1 (.x(s[1]), .y(d[1]), .s(sum[1]), .c(c[2]));
  for (genvar i = 2; i < WIDTH; i++) begin : g_row2
    full_adder u_fa (.x(s[i]), .y(d[i]), .z(c[i]), .s(sum[i]), .c(c[i+1]));
  end
  assign sum[WIDTH] = d[WIDTH] ^ c[WIDTH];

  initial begin
    assert (WIDTH >= 2) else $error("carry_save_adder: WIDTH must be 2 or more");
  end
endmodule
