// tb_vedic_2x2: exhaustive self-check of the 2x2 Vedic multiplier cell.
// All 16 operand pairs are applied; each product is compared with a*b worked
// out in the testbench. A watchdog ends the run if it hangs.
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0, failures = 0;

  vedic_2x2 dut (.a(a), .b(b), .q(q));

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        #1;
        checks++;
        if (q != 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
