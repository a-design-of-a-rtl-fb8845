// rx_hec_rom_tb: every address against the HEC of the header it stands for,
// with registered read. Address 0 is the idle cell (I.432 HEC 0x52);
// address 32+t holds, for time slot t, the CRC-8 (x^8+x^2+x+1) of the VCI
// value 32+t, except the three table entries kept as printed in the original
// board (slot 14: 0x65, slot 15: 0xC5,
// slot 31: 0xB5); addresses 1..31 read 0. A few
// entries are also checked against literal values of that table.
`timescale 1ns/1ps
module rx_hec_rom_tb;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [5:0] addr = 0;
  logic [7:0] rdata;
  rx_hec_rom dut (.*);
  always #5 clk = ~clk;

  function automatic logic [7:0] ref_crc(int v);
    logic [7:0] c = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      logic fb = c[7] ^ v[i];
      c = {c[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return c;
  endfunction

  logic [7:0] got [64];
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    for (int a = 0; a < 64; a++) begin
      logic [7:0] e;
      @(negedge clk); addr = 6'(a);
      @(negedge clk);
      got[a] = rdata;
      if (a == 0) e = 8'h52;
      else if (a == 46) e = 8'h65;
      else if (a == 47) e = 8'hC5;
      else if (a == 63) e = 8'hB5;
      else if (a >= 32) e = ref_crc(a);
      else e = 8'h00;
      checks++;
      if (rdata != e) begin failures++; $display("FAIL %0d: %h exp %h", a, rdata, e); end
    end
    // literal table values: slots 5, 6, 22, 29
    checks++; if (got[37] != 8'hFB || got[38] != 8'hF2 || got[54] != 8'h82 || got[61] != 8'hB3) begin
      failures++; $display("FAIL table values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
