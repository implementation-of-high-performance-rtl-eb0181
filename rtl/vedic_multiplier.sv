// vedic_multiplier: NxN-bit unsigned multiplier built by the Vedic
// "vertically and crosswise" (Urdhva Tiryagbhyam) decomposition.
//
// An NxN product is made from four N/2 x N/2 products of the operand halves
//   q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH
// joined by three adders (vedic_adder_tree). Each of those four products is
// made the same way from four smaller ones, down to 2x2 leaf cells
// (vedic_2x2). All partial products of one size are formed in parallel.
//
// The hierarchy is generated level by level rather than by a module that
// instantiates itself. Level L holds blocks of S = 2^(L+1) bits; block (i, j)
// of that level is the product a[S*i +: S] * b[S*j +: S]. A level-0 block is a
// 2x2 cell; a block of a higher level takes the four blocks (2i, 2j),
// (2i+1, 2j), (2i, 2j+1) and (2i+1, 2j+1) of the level below as q0..q3. For
// the default N = 64 there are six levels and 1024 2x2 cells.
//
// N must be a power of two, 2 or larger.
//
// Interface: a[N-1:0], b[N-1:0] in, q[2N-1:0] = a*b out. Combinational.
module vedic_multiplier #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] q
);
  localparam int unsigned LEVELS = $clog2(N);

  for (genvar L = 0; L < LEVELS; L++) begin : g_lvl
    localparam int unsigned S = 2 << L;  // operand bits of one block
    localparam int unsigned K = N / S;   // blocks per operand
    logic [2*S-1:0] prod [K][K];         // prod[i][j] = a-part i * b-part j

    for (genvar i = 0; i < K; i++) begin : g_i
      for (genvar j = 0; j < K; j++) begin : g_j
        if (L == 0) begin : g_leaf
          vedic_2x2 u_cell (
            .a(a[S*i +: S]),
            .b(b[S*j +: S]),
            .q(prod[i][j])
          );
        end else begin : g_join
          vedic_adder_tree #(.H(S / 2)) u_tree (
            .q0(g_lvl[L-1].prod[2*i][2*j]),
            .q1(g_lvl[L-1].prod[2*i+1][2*j]),
            .q2(g_lvl[L-1].prod[2*i][2*j+1]),
            .q3(g_lvl[L-1].prod[2*i+1][2*j+1]),
            .q (prod[i][j])
          );
        end
      end
    end
  end

  assign q = g_lvl[LEVELS-1].prod[0][0];

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $error("vedic_multiplier: N must be a power of two, got %0d", N);
  end
endmodule
