// rx_unload_addr_tb: loads random unload status, load status and index
// words and checks the buffer choice (TP+1 when loaded, else underrun),
// the index step 0..46, the written-back status words and the address for
// all four index selects against a reference model.
`timescale 1ns/1ps
module rx_unload_addr_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, tp_ce = 0, hp_ce = 0, idx_ce = 0;
  logic [4:0] slot = 0;
  idx_sel_e idx_sel = IXS_INDEX;
  logic [7:0] rd_data = 0;
  logic [14:0] addr;
  logic underrun, inactive_ch;
  logic [7:0] index_status, unload_status;
  rx_unload_addr dut (.*);
  always #5 clka = ~clka;
  int n_und = 0, n_adv = 0;
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    int tp, hp, idx, init, act, run, nb, ud, ni;
    logic [14:0] ea;
    #2 rst = 1; #5 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      tp = $urandom % 15; init = ($urandom % 4) != 0; act = ($urandom % 4) != 0;
      hp = (n % 2 == 0) ? tp : (tp + 1 + $urandom % 14) % 15;
      idx = ($urandom % 3 == 0) ? 0 : $urandom % 47;
      @(negedge clka); rd_data = {1'(act), 1'(init), 2'($urandom), 4'(tp)}; tp_ce = 1;
      @(negedge clka); tp_ce = 0; rd_data = {4'($urandom), 4'(hp)}; hp_ce = 1;
      @(negedge clka); hp_ce = 0; rd_data = {2'b00, 6'(idx)}; idx_ce = 1;
      @(negedge clka); idx_ce = 0; rd_data = 8'($urandom);
      slot = 5'($urandom); idx_sel = idx_sel_e'($urandom % 4);
      #1;
      run = init && act;
      nb = tp; ud = 0;
      if (run && idx == 0) begin
        if (tp != hp) begin nb = (tp + 1) % 15; n_adv++; end
        else begin ud = 1; n_und++; end
      end
      ni = !run ? idx : (idx == 46) ? 0 : idx + 1;
      case (idx_sel)
        IXS_INDEX:  ea = {5'(slot + 1), 4'd15, 6'd61};
        IXS_UNLOAD: ea = {5'(slot + 1), 4'd15, 6'd62};
        IXS_LOAD:   ea = {5'(slot + 1), 4'd15, 6'd63};
        default:    ea = {5'(slot + 1), 4'(nb), 6'(idx)};
      endcase
      checks++; if (underrun !== 1'(ud) || inactive_ch !== 1'(!run)) begin failures++; $display("FAIL und/inact"); end
      checks++; if (index_status !== {2'b00, 6'(ni)}) begin failures++; $display("FAIL index %h exp %0d", index_status, ni); end
      checks++; if (unload_status !== {1'(act), 1'b1, 1'(ud), 1'b0, 4'(nb)}) begin failures++; $display("FAIL ustat %h", unload_status); end
      checks++; if (addr !== ea) begin failures++; $display("FAIL addr %h exp %h", addr, ea); end
    end
    checks++; if (n_und < 50 || n_adv < 50) begin failures++; $display("FAIL coverage %0d %0d", n_und, n_adv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
