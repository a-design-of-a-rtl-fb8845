// tx_idle_insert_tb: over two full patterns (2 x 1128 cells) the idle
// cells must come every 75 or 76 cells, 15 per 1128, with runs of 75
// valid cells three times per pattern.
`timescale 1ns/1ps
module tx_idle_insert_tb;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, ce = 0;
  logic insert_idle;
  int idles = 0, run = -1, n75 = 0;
  tx_idle_insert dut (.*);
  always #5 clka = ~clka;
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #10 rst = 0;
    for (int k = 0; k < 2 * 1128 + 1; k++) begin
      @(negedge clka);
      if (insert_idle) begin
        if (run >= 0) begin
          checks++;
          if (run != 74 && run != 75) begin failures++; $display("FAIL run %0d", run); end
          if (run == 75) n75++;
        end
        run = 0;
        if (k > 0 && k <= 2 * 1128) idles++;
      end else if (run >= 0) run++;
      ce = 1;
      @(negedge clka);
      ce = 0;
      repeat (3) @(negedge clka);
    end
    checks++;
    if (idles != 30) begin failures++; $display("FAIL idles %0d", idles); end
    checks++;
    if (n75 < 5 || n75 > 6) begin failures++; $display("FAIL n75 %0d", n75); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
