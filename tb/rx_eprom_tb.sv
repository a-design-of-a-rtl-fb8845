// rx_eprom_tb: the three status locations of every time slot (Active bit
// set only for the 21 carried slots) and unprogrammed locations.
`timescale 1ns/1ps
module rx_eprom_tb;
  int checks = 0, failures = 0;
  logic clk = 0, ncs = 1;
  logic [14:0] addr = 0;
  logic [7:0] rdata;
  rx_eprom dut (.*);
  always #5 clk = ~clk;
  task automatic rd(logic [14:0] a, logic [7:0] e);
    @(negedge clk); ncs = 0; addr = a;
    @(negedge clk); ncs = 1;
    checks++;
    if (rdata !== e) begin failures++; $display("FAIL %h: %h exp %h", a, rdata, e); end
  endtask
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    for (int t = 0; t < 32; t++) begin
      bit act;
      act = (t > 4) && (t % 4 != 0);
      rd({5'(t), 4'd15, 6'd61}, 8'h00);
      rd({5'(t), 4'd15, 6'd62}, act ? 8'h80 : 8'h00);
      rd({5'(t), 4'd15, 6'd63}, 8'h70);
      rd({5'(t), 4'd3, 6'd62}, 8'hFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
