// tx_unload_addr_tb: byte-level reference model of the unload address:
// index 0..52 per cell (held across dead slots), channel 0..20 after
// StartToUnload except during idle cells, buffer rotation and NFirstTime,
// and the forcing of channel 31 / buffer 3 / index 63.
`timescale 1ns/1ps
module tx_unload_addr_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, bit_eq7 = 0, fsm_started = 0, dead_ts = 0;
  logic start_to_unload = 0, insert_idle = 0, csw_sel = 0, csw_active = 1;
  logic [12:0] addr;
  logic idx_eq0, sn_byte, idx_lt5, ch_inc, idle_ch_sel, nfirst_time;
  int idx = 0, ch = 0, bufc = 0, bufwraps = 0;
  logic m_idle;
  logic [12:0] m_addr;
  tx_unload_addr dut (.*);
  always #5 clka = ~clka;
  initial begin #20000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #5 rst = 0;
    for (int b = 0; b < 60000; b++) begin
      for (int k = 0; k < 4; k++) begin
        @(negedge clka);
        bit_eq7 = (k == 3);
        csw_sel = (k == 1) && ($urandom % 3 == 0);
        if (k == 0) begin
          fsm_started = (b > 3);
          dead_ts = ($urandom % 4 == 0);
          if (b == 2000) start_to_unload = 1;
          insert_idle = ($urandom % 40 == 0);
          csw_active = ($urandom % 30 != 0);
        end
        #1;
        m_idle = !csw_sel && (!start_to_unload || insert_idle || !csw_active);
        m_addr = {m_idle ? 5'd31 : 5'(ch),
                  (idx < 6 || csw_sel || m_idle) ? 2'd3 : 2'(bufc),
                  csw_sel ? 6'd63 : 6'(idx)};
        checks++;
        if (addr != m_addr || idle_ch_sel != m_idle || idx_eq0 != (idx == 0) ||
            sn_byte != (idx == 5) || idx_lt5 != (idx < 5) || nfirst_time != (bufwraps > 0)) begin
          failures++;
          if (failures < 10) $display("FAIL b %0d addr %h exp %h", b, addr, m_addr);
        end
        if (bit_eq7 && fsm_started && !dead_ts) begin
          checks++;
          if (ch_inc != (idx == 52)) failures++;
          if (idx == 52) begin
            idx = 0;
            if (start_to_unload && !insert_idle) begin
              if (ch == 20) begin ch = 0; bufc = (bufc + 1) % 3; bufwraps++; end
              else ch++;
            end
          end else idx++;
        end
      end
    end
    checks++;
    if (bufwraps < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
