// accumulator: the parallel-in parallel-out (PIPO) register of the MAC unit.
//
// On every rising clock edge it loads d, all WIDTH bits at once, and presents
// the stored value on q. rst clears it to zero at the clock edge (synchronous,
// active high); the design names a reset input but not its timing, so
// synchronous clearing is this implementation's choice.
//
// WIDTH defaults to 129: a 128-bit product plus one carry bit.
module accumulator #(
  parameter int unsigned WIDTH = 129
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
