// tx_ts_map_tb: every time slot against the channel table; the 21 carried
// PCM slots (the slot before the load slot) must land on channels 0..20 in
// order, every other slot on channels 21..30; eq20 only for channel 20.
`timescale 1ns/1ps
module tx_ts_map_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] ts = 0, ch;
  logic eq20;
  int used [32];
  tx_ts_map dut (.*);
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    for (int i = 0; i < 32; i++) used[i] = 0;
    for (int c = 0; c < 21; c++) begin
      ts = 5'(ch_to_ts(5'(c)) + 5'd1); #1;
      checks++;
      if (ch != 5'(c)) begin failures++; $display("FAIL ch %0d from ts %0d -> %0d", c, ts, ch); end
    end
    for (int t = 0; t < 32; t++) begin
      ts = 5'(t); #1;
      used[ch]++;
      checks++;
      if (eq20 != (ch == 5'd20)) failures++;
      checks++;
      if (!ts_active(5'(t - 1)) && ch < 5'd21) failures++;
      checks++;
      if (ch == 5'd31) failures++;
    end
    for (int c = 0; c < 21; c++) begin checks++; if (used[c] != 1) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
