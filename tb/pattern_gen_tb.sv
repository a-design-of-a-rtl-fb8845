// pattern_gen_tb: deserialises the generator output slot by slot after
// FMB and compares every byte with the eleven-value sequence: slot t of
// the first frame after FMB carries value t mod 11 and slot t of the
// second frame value (t+10) mod 11.
`timescale 1ns/1ps
module pattern_gen_tb;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, fmb = 0, sout;
  pattern_gen dut (.*);
  always #5 clka = ~clka;
  logic [7:0] seq [11] = '{8'h69, 8'h97, 8'h65, 8'hA6, 8'h5D, 8'h96, 8'h99, 8'h76, 8'h5A, 8'h65, 8'hD9};
  initial begin #10ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    logic [7:0] b;
    #2 rst = 1; #5 rst = 0;
    for (int f = 0; f < 6; f++) begin
      @(negedge clka); fmb = 1;
      @(negedge clka); fmb = 0;
      // the cycle after FMB is sampled is slot 0, bit 0; output is valid now
      for (int s = 0; s < 64; s++) begin
        for (int k = 0; k < 8; k++) begin
          b = {b[6:0], sout};
          if (!(s == 63 && k == 7)) @(negedge clka);
        end
        checks++;
        if (b !== seq[(s % 32 + (s >= 32 ? 10 : 0)) % 11]) begin
          failures++; $display("FAIL frame %0d slot %0d got %h", f, s, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
