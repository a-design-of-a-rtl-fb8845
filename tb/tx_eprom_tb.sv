// tx_eprom_tb: reads the header, HEC, first SN (0x01) and CSW (0x80) of
// every channel, a few HECs against literal values of the original table,
// the idle cell, and some unprogrammed locations (0xFF); read data is
// registered (one-cycle latency) and held while ncs is high.
`timescale 1ns/1ps
module tx_eprom_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, ncs = 1;
  logic [12:0] addr = 0;
  logic [7:0] rdata;
  tx_eprom dut (.*);
  always #5 clk = ~clk;
  task automatic rd(logic [12:0] a, logic [7:0] e);
    @(negedge clk); ncs = 0; addr = a;
    @(negedge clk); ncs = 1; addr = ~a;
    checks++;
    if (rdata !== e) begin failures++; $display("FAIL %h: %h exp %h", a, rdata, e); end
    @(negedge clk);
    checks++;
    if (rdata !== e) failures++;
  endtask
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    for (int c = 0; c < 21; c++) begin
      logic [4:0] ts;
      logic [31:0] h;
      ts = ch_to_ts(5'(c));
      h  = {4'h0, 8'h00, 16'(32 + ts), 4'h0};
      rd({5'(c), 2'd3, 6'd0}, 8'h00);
      rd({5'(c), 2'd3, 6'd2}, h[15:8]);
      rd({5'(c), 2'd3, 6'd3}, h[7:0]);
      rd({5'(c), 2'd3, 6'd4}, header_hec(h));
      rd({5'(c), 2'd3, 6'd5}, 8'h01);
      rd({5'(c), 2'd3, 6'd63}, 8'h80);
      rd({5'(c), 2'd0, 6'd10}, 8'hFF);
    end
    // literal HEC values of the original table: channels 0, 7, 8, 13, 20
    rd({5'd0, 2'd3, 6'd4}, 8'hFB);
    rd({5'd7, 2'd3, 6'd4}, 8'h65);
    rd({5'd8, 2'd3, 6'd4}, 8'hC5);
    rd({5'd13, 2'd3, 6'd4}, 8'h82);
    rd({5'd20, 2'd3, 6'd4}, 8'hB5);
    rd({5'd31, 2'd3, 6'd63}, 8'h80);
    rd({5'd31, 2'd3, 6'd3}, 8'h01);
    rd({5'd31, 2'd3, 6'd4}, 8'h52);
    rd({5'd31, 2'd3, 6'd20}, 8'h6A);
    rd({5'd31, 2'd3, 6'd52}, 8'h6A);
    rd({5'd25, 2'd3, 6'd4}, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
