// tb_carry_save_adder: self-check of the two-row carry save adder.
// An 8-bit instance is checked exhaustively over both addends and the carry
// in; the default 128-bit instance is checked on corner values (full carry
// propagation, all ones plus carry in) and on random values. Every sum is
// compared with p + q + cin worked out in the testbench.
module tb_carry_save_adder;
  localparam int unsigned RANDOM_CASES = 20000;

  logic [7:0]   p8, q8;
  logic         cin8;
  logic [8:0]   s8;
  logic [127:0] p, q;
  logic         cin;
  logic [128:0] s;
  int checks = 0, failures = 0;

  carry_save_adder #(.WIDTH(8)) dut8 (.p(p8), .q(q8), .cin(cin8), .sum(s8));
  carry_save_adder              dut  (.p(p), .q(q), .cin(cin), .sum(s));

  task automatic check128(input logic [127:0] x, input logic [127:0] y, input logic c);
    logic [128:0] expected;
    p = x;
    q = y;
    cin = c;
    #1;
    expected = {1'b0, x} + {1'b0, y} + 129'(c);
    checks++;
    if (s !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL 128: %h + %h + %0d got %h", x, y, c, s);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        for (int c = 0; c < 2; c++) begin
          p8 = 8'(i);
          q8 = 8'(j);
          cin8 = 1'(c);
          #1;
          checks++;
          if (s8 != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8: %0d+%0d+%0d got %0d", i, j, c, s8);
          end
        end
      end
    end

    check128('1, 128'd1, 1'b0);
    check128('1, '1, 1'b1);
    check128('1, '0, 1'b1);
    check128('0, '0, 1'b0);
    check128({64'h0, '1}, {64'h0, 64'h1}, 1'b0);
    for (int k = 0; k < RANDOM_CASES; k++)
      check128({$urandom, $urandom, $urandom, $urandom},
               {$urandom, $urandom, $urandom, $urandom}, 1'($urandom));

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
