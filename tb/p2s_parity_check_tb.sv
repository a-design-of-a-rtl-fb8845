// p2s_parity_check_tb: loads a 9-bit word every 8 cycles (some with a
// wrong parity bit, some forced to ones, some with checking off), checks
// the serial output bit by bit and parity_err after the next load.
`timescale 1ns/1ps
module p2s_parity_check_tb;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, load = 0, force_ones = 0, chk_en = 0;
  logic [8:0] din = 0;
  logic sout, parity_err;
  logic [8:0] cur = 9'h1FF;
  logic cur_force = 1, cur_chk = 0, cur_bad = 0;
  int bitn = 0;
  p2s_parity_check dut (.*);
  always #5 clka = ~clka;
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #10 rst = 0;
    for (int w = 0; w < 400; w++) begin
      for (int b = 0; b < 8; b++) begin
        @(negedge clka);
        if (w > 0) begin
          checks++;
          if (sout != (cur_force ? 1'b1 : cur[7 - b])) failures++;
        end
        load = (b == 7);
        if (load) begin
          logic [7:0] d;
          logic bad;
          d = 8'($urandom);
          bad = ($urandom % 5 == 0);
          force_ones = ($urandom % 7 == 0);
          chk_en = ($urandom % 6 != 0);
          din = {(~^d) ^ bad, d};
        end
        @(posedge clka);
        #1;
        if (load) begin
          if (w > 0) begin
            checks++;
            if (parity_err != (cur_chk && cur_bad)) begin
              failures++;
              if (failures < 10) $display("FAIL parity_err=%b word %0d", parity_err, w);
            end
          end
          cur = din; cur_force = force_ones; cur_chk = chk_en && !force_ones;
          cur_bad = (din[8] != ~^din[7:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
