// s2p_parity_tb: random serial bits, MSB first; at every bit-7 cycle the
// assembled byte and its parity bit (XNOR of the data) must match.
`timescale 1ns/1ps
module s2p_parity_tb;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, sin = 0, bit_eq7 = 0;
  logic [7:0] byte_now;
  logic par_now;
  logic [7:0] exp_b = 0;
  s2p_parity dut (.*);
  always #5 clka = ~clka;
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #10 rst = 0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clka);
      sin     = 1'($urandom);
      bit_eq7 = (c % 8 == 7);
      exp_b   = {exp_b[6:0], sin};
      #1;
      if (bit_eq7 && c > 8) begin
        checks++;
        if (byte_now != exp_b || par_now != ~^exp_b) begin
          failures++;
          if (failures < 10) $display("FAIL %h/%b vs %h", byte_now, par_now, exp_b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
