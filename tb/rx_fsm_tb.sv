// rx_fsm_tb: drives random flags in every phase and checks the memory
// operation chosen (SRAM read/write, EPROM read, none), the address and
// data sources, the index select, the processor acknowledge and that each
// capture enable follows its read by exactly one CLKA. The expected
// operation table is the phase plan of the receiver.
`timescale 1ns/1ps
module rx_fsm_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0;
  logic [2:0] bit_cnt = 0;
  logic start_to_unload = 0, rul_nfirst = 0, rl_nfirst = 0, sn_flag = 0, wr_flag = 0;
  logic last_flag = 0, overrun = 0, r_req = 0, proc_we = 0;
  src_sel_e addr_sel, din_sel;
  idx_sel_e idx_sel;
  logic nsram_cs, nsram_rw, neprom_cs, eprom_sel, r_ack, load_status_we;
  logic ul_tp_ce, ul_hp_ce, ul_idx_ce, rl_tp_ce, rl_hp_ce, data_out_ce, proc_rd_ce;
  rx_fsm dut (.*);
  always #5 clka = ~clka;

  // expected: op 0 none, 1 SRAM read, 2 SRAM write, 3 EPROM read
  int op, rd;        // rd: which capture enable the read feeds (bit index), -1 none
  src_sel_e ea, ed;
  idx_sel_e ei;
  logic eack, elsw;
  task automatic model();
    op = 0; rd = -1; ea = SRC_NONE; ed = SRC_NONE; ei = IXS_INDEX; eack = 0; elsw = 0;
    case (bit_cnt)
      0, 1, 2: if (start_to_unload) begin
        op = rul_nfirst ? 1 : 3; ea = SRC_UNLOAD; rd = 6 - int'(bit_cnt);
        ei = (bit_cnt == 0) ? IXS_UNLOAD : (bit_cnt == 1) ? IXS_LOAD : IXS_INDEX;
      end
      3: if (sn_flag) begin op = rl_nfirst ? 1 : 3; ea = SRC_LOAD; ei = IXS_UNLOAD; rd = 3; end
         else if (wr_flag && !overrun) begin op = 2; ea = SRC_LOAD; ed = SRC_UNLOAD; ei = IXS_INDEX; end
      4: if (sn_flag) begin op = rl_nfirst ? 1 : 3; ea = SRC_LOAD; ei = IXS_LOAD; rd = 2; end
         else if (last_flag) begin op = 2; ea = SRC_LOAD; ed = SRC_LOAD; ei = IXS_LOAD; elsw = 1; end
         else if (r_req) begin
           op = proc_we ? 2 : 1; ea = SRC_PROC; ed = SRC_PROC; eack = 1; rd = proc_we ? -1 : 0;
         end
      5: if (start_to_unload) begin op = 1; ea = SRC_UNLOAD; ei = IXS_DATA; rd = 1; end
      6: if (start_to_unload) begin op = 2; ea = SRC_UNLOAD; ed = SRC_LOAD; ei = IXS_INDEX; end
      7: if (start_to_unload) begin op = 2; ea = SRC_UNLOAD; ed = SRC_LOAD; ei = IXS_UNLOAD; end
    endcase
  endtask

  int prev_rd = -1;
  int ops [4] = '{0, 0, 0, 0};
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    logic [6:0] ce, ece;
    int got;
    #2 rst = 1; #5 rst = 0;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clka);
      // capture enables registered from the previous phase
      ce = {ul_tp_ce, ul_hp_ce, ul_idx_ce, rl_tp_ce, rl_hp_ce, data_out_ce, proc_rd_ce};
      ece = (prev_rd < 0) ? 7'd0 : 7'(1) << prev_rd;
      checks++; if (ce !== ece) begin failures++; $display("FAIL ce %b exp %b", ce, ece); end
      bit_cnt = 3'(n);
      {start_to_unload, rul_nfirst, rl_nfirst, sn_flag, wr_flag, last_flag, overrun, r_req, proc_we} = 9'($urandom);
      if ($urandom % 2 == 1) {sn_flag, last_flag} = 2'b00;
      #1;
      model();
      got = !nsram_cs ? (nsram_rw ? 1 : 2) : !neprom_cs ? 3 : 0;
      ops[op]++;
      checks++; if (got != op) begin failures++; $display("FAIL op %0d exp %0d phase %0d", got, op, bit_cnt); end
      checks++; if (eprom_sel !== (op == 3)) begin failures++; $display("FAIL eprom_sel"); end
      if (op != 0) begin
        checks++; if (addr_sel !== ea || idx_sel !== ei) begin failures++; $display("FAIL sel phase %0d", bit_cnt); end
      end
      if (op == 2) begin
        checks++; if (din_sel !== ed) begin failures++; $display("FAIL din_sel phase %0d", bit_cnt); end
      end
      checks++; if (r_ack !== eack || load_status_we !== elsw) begin failures++; $display("FAIL ack/lsw phase %0d", bit_cnt); end
      prev_rd = rd;
    end
    checks++; if (ops[1] == 0 || ops[2] == 0 || ops[3] == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
