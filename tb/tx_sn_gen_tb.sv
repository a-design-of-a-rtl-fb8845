// tx_sn_gen_tb: all 16 inputs against the SN table; the CSI=0 chain must
// run through SN 1..7 and back to the first byte in eight steps; memory
// parity bit = XNOR of the data.
`timescale 1ns/1ps
module tx_sn_gen_tb;
  int checks = 0, failures = 0;
  logic [3:0] sn_in = 0;
  logic [8:0] sn_out;
  logic [7:0] exp_t [16] = '{8'h16, 8'h2C, 8'h3B, 8'h4F, 8'h58, 8'h62, 8'h75, 8'h00,
                             8'h9D, 8'hA7, 8'hB0, 8'hC4, 8'hD3, 8'hE9, 8'hFE, 8'h8A};
  logic [7:0] v;
  tx_sn_gen dut (.*);
  initial begin #100000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    for (int i = 0; i < 16; i++) begin
      sn_in = 4'(i); #1;
      checks++;
      if (sn_out[7:0] != exp_t[i] || sn_out[8] != ~^sn_out[7:0]) begin
        failures++; $display("FAIL %0d -> %h", i, sn_out);
      end
      checks++;
      if (sn_out[7] != sn_in[3]) failures++;     // CSI kept
    end
    v = 8'h00;
    for (int k = 1; k <= 8; k++) begin
      sn_in = v[7:4]; #1;
      v = sn_out[7:0];
      checks++;
      if (v[6:4] != 3'(k)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
