// tb_vedic_multiplier: self-check of the Vedic multiplier at four sizes.
// N = 4 and N = 8 are checked exhaustively, N = 16 on random operands, and
// the default N = 64 on corner operands (zero, one, all ones, single bits,
// alternating patterns) and on random operands. Every product is compared
// with the full-width product a*b worked out in the testbench. A watchdog
// ends a hung run.
module tb_vedic_multiplier;
  localparam int unsigned RANDOM_CASES = 20000;

  logic [3:0]   a4, b4;
  logic [7:0]   q4;
  logic [7:0]   a8, b8;
  logic [15:0]  q8;
  logic [15:0]  a16, b16;
  logic [31:0]  q16;
  logic [63:0]  a64, b64;
  logic [127:0] q64;
  int checks = 0, failures = 0;

  vedic_multiplier #(.N(4)) dut4 (.a(a4), .b(b4), .q(q4));
  vedic_multiplier #(.N(8)) dut8 (.a(a8), .b(b8), .q(q8));
  vedic_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .q(q16));
  vedic_multiplier          dut64 (.a(a64), .b(b64), .q(q64));

  task automatic check64(input logic [63:0] x, input logic [63:0] y);
    logic [127:0] expected;
    a64 = x;
    b64 = y;
    #1;
    expected = {64'd0, x} * {64'd0, y};
    checks++;
    if (q64 !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL 64: %h * %h got %h expected %h", x, y, q64, expected);
    end
  endtask

  initial begin
    logic [63:0] corner [8];
    corner = '{64'd0, 64'd1, '1, 64'h8000_0000_0000_0000, 64'hAAAA_AAAA_AAAA_AAAA,
               64'h5555_5555_5555_5555, 64'h0000_0000_FFFF_FFFF, 64'hFFFF_FFFF_0000_0000};

    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (q4 != 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 4: %0d*%0d got %0d", i, j, q4);
        end
      end
    end

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if (q8 != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8: %0d*%0d got %0d", i, j, q8);
        end
      end
    end

    for (int k = 0; k < RANDOM_CASES; k++) begin
      a16 = 16'($urandom);
      b16 = (k == 0) ? 16'hFFFF : 16'($urandom);
      if (k == 0) a16 = 16'hFFFF;
      #1;
      checks++;
      if (q16 != {16'd0, a16} * {16'd0, b16}) begin
        failures++;
        if (failures < 10) $display("FAIL 16: %h*%h got %h", a16, b16, q16);
      end
    end

    foreach (corner[i]) foreach (corner[j]) check64(corner[i], corner[j]);
    for (int k = 0; k < 64; k++) check64(64'd1 << k, '1);
    for (int k = 0; k < RANDOM_CASES; k++) check64({$urandom, $urandom}, {$urandom, $urandom});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
