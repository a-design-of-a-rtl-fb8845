// sync_sram_tb: random writes and reads against a reference array; reads
// return data one clock after the address and hold it while deselected.
`timescale 1ns/1ps
module sync_sram_tb;
  int checks = 0, failures = 0;
  logic clk = 0, ncs = 1, nrw = 1;
  logic [12:0] addr = 0;
  logic [8:0] wdata = 0, rdata;
  logic [8:0] ref_m [64];
  bit valid [64];
  logic [8:0] exp_q = 0;
  bit chk = 0;
  sync_sram #(.AW(13), .DW(9)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    for (int i = 0; i < 64; i++) begin ref_m[i] = 0; valid[i] = 0; end
    for (int c = 0; c < 5000; c++) begin
      int a;
      @(negedge clk);
      if (chk) begin
        checks++;
        if (rdata !== exp_q) begin failures++; if (failures < 10) $display("FAIL %h exp %h", rdata, exp_q); end
      end
      a = $urandom % 64;
      addr = {7'h55, 6'(a)};
      ncs = ($urandom % 4 == 0);
      nrw = ($urandom % 2 == 0);
      wdata = 9'($urandom);
      if (!ncs && !nrw) begin ref_m[a] = wdata; valid[a] = 1; end
      if (!ncs && nrw && valid[a]) begin exp_q = ref_m[a]; chk = 1; end
      else if (!ncs && nrw) chk = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
