// rx_load_addr_tb: random register loads of TP, HP and SN, then checks the
// next buffer (HP+1 mod 15), the overrun rule (only after initialisation),
// the load status word and the address for all three index selects,
// against a reference model written from the module's description.
`timescale 1ns/1ps
module rx_load_addr_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, rl_tp_ce = 0, rl_hp_ce = 0, sn_ce = 0, rl_nfirst = 0;
  logic [4:0] ts = 0;
  idx_sel_e idx_sel = IXS_INDEX;
  logic [5:0] wr_idx = 0;
  logic [3:0] rd_data = 0;
  logic [2:0] sn_in = 0;
  logic [14:0] addr;
  logic overrun;
  logic [3:0] buf_value;
  logic [7:0] load_status;
  rx_load_addr dut (.*);
  always #5 clka = ~clka;
  int n_ovr = 0;
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    int tp, hp, sn, nb, ov;
    logic [14:0] ea;
    #2 rst = 1; #5 rst = 0;
    for (int n = 0; n < 2000; n++) begin
      tp = $urandom % 15; hp = $urandom % 15; sn = $urandom % 8;
      @(negedge clka); rd_data = 4'(tp); rl_tp_ce = 1;
      @(negedge clka); rl_tp_ce = 0; rd_data = 4'(hp); rl_hp_ce = 1;
      @(negedge clka); rl_hp_ce = 0; sn_in = 3'(sn); sn_ce = 1;
      @(negedge clka); sn_ce = 0; rd_data = 4'($urandom); sn_in = 3'($urandom);
      rl_nfirst = ($urandom % 4) != 0;
      // make overruns common
      if ($urandom % 3 == 0) begin
        @(negedge clka); rd_data = 4'((hp + 1) % 15); rl_tp_ce = 1;
        @(negedge clka); rl_tp_ce = 0; tp = (hp + 1) % 15;
      end
      ts = 5'($urandom); wr_idx = 6'($urandom % 47);
      idx_sel = idx_sel_e'($urandom % 3);
      #1;
      nb = (hp + 1) % 15;
      ov = (nb == tp) && rl_nfirst;
      if (ov) begin nb = hp; n_ovr++; end
      case (idx_sel)
        IXS_UNLOAD: ea = {ts, 4'd15, 6'd62};
        IXS_LOAD:   ea = {ts, 4'd15, 6'd63};
        default:    ea = {ts, 4'(nb), wr_idx};
      endcase
      checks++; if (overrun !== 1'(ov)) begin failures++; $display("FAIL ovr tp %0d hp %0d", tp, hp); end
      checks++; if (buf_value !== 4'(nb)) begin failures++; $display("FAIL buf %0d exp %0d", buf_value, nb); end
      checks++; if (load_status !== {1'(ov), 3'(sn), 4'(nb)}) begin failures++; $display("FAIL status %h", load_status); end
      checks++; if (addr !== ea) begin failures++; $display("FAIL addr %h exp %h", addr, ea); end
    end
    checks++; if (n_ovr < 100) begin failures++; $display("FAIL few overruns %0d", n_ovr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
