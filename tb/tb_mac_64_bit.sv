// tb_mac_64_bit: end-to-end self-check of the 64-bit MAC unit at its default
// size (no parameter overrides).
//
// A reference model keeps the 129-bit running sum, worked out with the
// testbench's own wide arithmetic. The test drives:
//   1. a reset, which must clear out at the next edge;
//   2. a known dot product, 1*1 + 2*2 + ... + 8*8 = 204;
//   3. a long random stream of operands, checked after every edge, and
//      checked just before each edge to hold the previous sum (one product is
//      accumulated per clock, visible right after its edge);
//   4. a reset in the middle of a stream;
//   5. all-ones operands, so the sum first carries into bit 128 and then wraps
//      past 2^129.
// Each mechanism is counted (accumulate, reset clear, carry into the 129th bit,
// wrap modulo 2^129); one that never happened counts as a failure.
module tb_mac_64_bit;
  localparam int unsigned RANDOM_CYCLES = 5000;
  localparam int unsigned WATCHDOG_CYCLES = RANDOM_CYCLES + 1000;

  logic         clk = 1'b0;
  logic         rst;
  logic [63:0]  a, b;
  logic [128:0] out;
  logic [128:0] model;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_accumulate = 0, n_clear = 0, n_carry128 = 0, n_wrap = 0;

  mac_64_bit dut (.clk(clk), .rst(rst), .a(a), .b(b), .out(out));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic void check(input string what, input logic [128:0] expected);
    checks++;
    if (out !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d: out=%h expected %h", what, cycle, out, expected);
    end
  endfunction

  // Apply one operation for one clock and update the model.
  task automatic step(input logic r, input logic [63:0] x, input logic [63:0] y);
    logic [129:0] wide;
    rst = r;
    a = x;
    b = y;
    #1;
    check("hold before edge", model);
    wide = {1'b0, model} + {2'b00, {64'd0, x} * {64'd0, y}};
    if (r) begin
      model = '0;
      n_clear++;
    end else begin
      if (wide[129]) n_wrap++;
      if (wide[128] && !model[128]) n_carry128++;
      model = wide[128:0];
      n_accumulate++;
    end
    @(posedge clk);
    #1;
    check("after edge", model);
  endtask

  initial begin
    rst = 1'b1;
    a = '0;
    b = '0;
    model = '0;
    @(negedge clk);
    step(1'b1, {$urandom, $urandom}, {$urandom, $urandom});

    // Known dot product.
    for (int k = 1; k <= 8; k++) step(1'b0, 64'(k), 64'(k));
    checks++;
    if (out != 129'd204) begin
      failures++;
      $display("FAIL dot product: out=%0d expected 204", out);
    end

    // Random stream with occasional resets.
    for (int k = 0; k < RANDOM_CYCLES; k++)
      step((k % 1000) == 500, {$urandom, $urandom}, {$urandom, $urandom});

    // Largest operands: carry into bit 128, then wrap past 2^129.
    step(1'b1, '0, '0);
    for (int k = 0; k < 6; k++) step(1'b0, '1, '1);

    $display("mechanisms: accumulate=%0d clear=%0d carry_into_bit128=%0d wrap=%0d",
             n_accumulate, n_clear, n_carry128, n_wrap);
    checks += 4;
    if (n_accumulate == 0) begin failures++; $display("FAIL accumulate never happened"); end
    if (n_clear == 0)      begin failures++; $display("FAIL clear never happened"); end
    if (n_carry128 == 0)   begin failures++; $display("FAIL carry into bit 128 never happened"); end
    if (n_wrap == 0)       begin failures++; $display("FAIL wrap never happened"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == WATCHDOG_CYCLES);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
