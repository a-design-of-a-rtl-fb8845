// rx_header_recog_tb: a byte stream of random bytes with cell headers
// (user and idle) inserted; Header must be high exactly on the third byte
// of each 00 00 0000_00xx run of zero-test passes, checked against a
// reference of the two-level zero test.
`timescale 1ns/1ps
module rx_header_recog_tb;
  int checks = 0, failures = 0, hits = 0;
  logic clka = 0, rst = 0, byte_ce = 0;
  logic [7:0] sp = 0;
  logic header;
  bit r1 = 0, r2 = 0, hq = 0;
  rx_header_recog dut (.*);
  always #5 clka = ~clka;
  initial begin #10000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    int k = 0;
    logic [7:0] q [$];
    #2 rst = 1; #5 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      if (q.size() == 0) begin
        case ($urandom % 4)
          0: begin q.push_back(8'h00); q.push_back(8'h00); q.push_back(8'h02); q.push_back(8'h50); end
          1: begin q.push_back(8'h00); q.push_back(8'h00); q.push_back(8'h00); q.push_back(8'h01); end
          default: for (int i = 0; i < 5; i++) q.push_back(($urandom % 3 == 0) ? 8'h00 : 8'($urandom));
        endcase
      end
      @(negedge clka);
      sp = q.pop_front();
      byte_ce = 1;
      #1;
      begin
        bit za, zb, h;
        za = hq ? (sp[3:2] == 0) : (sp[7:2] == 0);
        zb = hq ? 1 : (sp[1:0] == 0);
        h  = za && r1 && r2;
        checks++;
        if (header != h) begin failures++; if (failures < 10) $display("FAIL n %0d sp %h", n, sp); end
        if (h) hits++;
        @(posedge clka);
        r2 = r1; r1 = za && zb; hq = h;
      end
      @(negedge clka);
      byte_ce = 0;
      sp = 8'($urandom);
      #1;
      checks++;
      if (header != ((hq ? (sp[3:2] == 0) : (sp[7:2] == 0)) && r1 && r2)) failures++;
    end
    checks++;
    if (hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
