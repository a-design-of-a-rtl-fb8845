// dead_byte_counter_tb: with FMB every 64 slots, tc must be high exactly
// in slots 3, 7, ..., 31 (the slot before each dead slot).
`timescale 1ns/1ps
module dead_byte_counter_tb;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, fmb = 0, bit_eq7 = 0;
  logic tc;
  int slot = 0;
  dead_byte_counter dut (.*);
  always #5 clka = ~clka;
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #10 rst = 0;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clka);
      bit_eq7 = (c % 8 == 7);
      fmb = (c % 512 == 511);
      slot = (c / 8) % 32;
      #1;
      checks++;
      if (tc != (slot % 4 == 3)) begin
        failures++;
        if (failures < 10) $display("FAIL c %0d slot %0d tc %b", c, slot, tc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
