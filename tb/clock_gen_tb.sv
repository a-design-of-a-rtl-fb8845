// clock_gen_tb: checks that CLKA is C4M divided by two, that FMB comes
// once every 1024 C4M cycles (512 CLKA), that it is high for exactly one
// CLKA rising edge, and that FMB never changes at a CLKA rising edge.
`timescale 1ns/1ps
module clock_gen_tb;
  int checks = 0, failures = 0;
  logic c4m = 0, rst = 0, clka, fmb;
  clock_gen dut (.*);
  always #122 c4m = ~c4m;
  int nclka = 0, last_fmb = -1, nfmb = 0;
  always @(posedge clka) begin
    nclka++;
    if (fmb) begin
      nfmb++;
      if (last_fmb >= 0) begin
        checks++; if (nclka - last_fmb != 512) begin failures++; $display("FAIL period %0d", nclka - last_fmb); end
      end
      last_fmb = nclka;
    end
  end
  // CLKA halves C4M: CLKA toggles on each C4M rising edge
  logic cl_q = 0;
  int c4 = 0;
  always @(posedge c4m) begin
    #1;
    c4++;
    if (!rst && c4 > 2) begin checks++; if (clka === cl_q) begin failures++; $display("FAIL clka not toggling"); end end
    cl_q = clka;
  end
  bit started = 0;
  always @(fmb) if (started) begin checks++; if (clka !== 1'b0) begin failures++; $display("FAIL fmb changes while clka high"); end end
  initial begin #10ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #5 rst = 0; #1 started = 1;
    repeat (1024 * 12) @(posedge c4m);
    checks++; if (nfmb < 11) begin failures++; $display("FAIL fmb count %0d", nfmb); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
