// tb_accumulator: self-check of the PIPO accumulator register.
// Random words are loaded on successive clock edges and must appear on q
// right after the edge they were loaded at, all 129 bits at once; the
// synchronous reset must clear q at the next edge, and q must hold its value
// between edges. A watchdog ends a hung run.
module tb_accumulator;
  localparam int unsigned W = 129;
  localparam int unsigned CYCLES = 2000;

  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0;
  int cycle = 0;

  accumulator dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    rst = 1'b1;
    d = {1'b1, {$urandom, $urandom, $urandom, $urandom}};
    @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset: q=%h", q); end

    rst = 1'b0;
    for (int k = 0; k < CYCLES; k++) begin
      d = {1'($urandom), $urandom, $urandom, $urandom, $urandom};
      model = (k % 97 == 50) ? '0 : d;
      rst = (k % 97 == 50);
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: q=%h expected %h", k, q, model);
      end
      d = ~d;  // must not reach q before the next edge
      #2;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL hold %0d: q=%h", k, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycle == CYCLES + 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
