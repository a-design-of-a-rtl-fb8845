// tdm_timing_tb: checks the bit and slot counters against a reference
// count, with FMB every 64 slots, plus a mid-frame FMB (counters must
// restart from slot 0, bit 0 on the next cycle).
`timescale 1ns/1ps
module tdm_timing_tb;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, fmb = 0;
  logic fmb_sync, bit_eq7;
  logic [2:0] bit_cnt;
  logic [4:0] slot;
  int mb = 0, ms = 0, cyc = 0;
  tdm_timing dut (.*);
  always #5 clka = ~clka;
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #5 rst = 0;
    for (cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clka);
      fmb = (cyc % 512 == 511) || (cyc == 1700) || (cyc == 0);
      checks++;
      if (bit_cnt != 3'(mb) || slot != 5'(ms) || bit_eq7 != (mb == 7)) begin
        failures++;
        if (failures < 10) $display("FAIL cyc %0d: %0d/%0d vs %0d/%0d", cyc, slot, bit_cnt, ms, mb);
      end
      @(posedge clka);
      if (fmb) begin mb = 0; ms = 0; end
      else begin
        if (mb == 7) ms = (ms + 1) % 32;
        mb = (mb + 1) % 8;
      end
      #1;
      checks++;
      if (fmb_sync != fmb) begin failures++; $display("FAIL fmb_sync cyc %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
