// tx_fsm_tb: random status inputs; after FMB the FSM must run LOAD, UL1,
// UL2, PROC in bit pairs 0-1, 2-3, 4-5, 6-7 of every slot, and every output
// is compared with a reference decode of the document's three options
// (load, unload of CSW/header/data/SN, processor) and the EPROM select.
`timescale 1ns/1ps
module tx_fsm_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0;
  logic [2:0] bit_cnt = 0;
  logic fmb_sync = 0, dead_ts = 0, idx_eq0 = 0, sn_byte = 0, idx_lt5 = 0, insert_idle = 0;
  logic idle_ch_sel = 0, nfirst_time = 0, t_req = 0, proc_we = 0;
  logic index_ld, fsm_started, t_ack, nsramcs, nsramrw, neprom_cs, eprom_sel;
  logic dataout_ce, csw_ce, csw_sel;
  src_sel_e mux_sel;
  bit started = 0;
  int n_ack = 0, n_csw = 0, n_snw = 0;
  tx_fsm dut (.*);
  always #5 clka = ~clka;
  initial begin #10000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #5 rst = 0;
    for (int c = 0; c < 40000; c++) begin
      logic cs, rd, ack, dce, cce, csel, es;
      src_sel_e m;
      @(negedge clka);
      bit_cnt = 3'(c % 8);
      fmb_sync = (c == 100);
      if (c % 8 == 0) begin
        dead_ts = ($urandom % 4 == 0);
        idx_eq0 = ($urandom % 6 == 0);
        sn_byte = !idx_eq0 && ($urandom % 5 == 0);
        idx_lt5 = idx_eq0 || (!sn_byte && $urandom % 4 == 0);
        insert_idle = ($urandom % 8 == 0);
        idle_ch_sel = ($urandom % 6 == 0);
        nfirst_time = (c > 20000);
        t_req = ($urandom % 2 == 0);
        proc_we = ($urandom % 2 == 0);
      end
      #1;
      cs = 0; rd = 1; ack = 0; dce = 0; cce = 0; csel = 0; m = SRC_NONE;
      if (started) begin
        case (bit_cnt[2:1])
          2'd0: begin m = SRC_LOAD; cs = 1; rd = 0; end
          2'd1: if (!dead_ts) begin
                  m = SRC_UNLOAD; cs = 1;
                  if (idx_eq0) begin csel = 1; cce = 1; end else dce = 1;
                end
          2'd2: if (!dead_ts) begin
                  if (idx_eq0) begin m = SRC_UNLOAD; cs = 1; dce = 1; end
                  else if (sn_byte && !idle_ch_sel) begin m = SRC_UNLOAD; cs = 1; rd = 0; end
                end
          default: if (t_req) begin ack = 1; m = SRC_PROC; cs = 1; rd = !proc_we; end
        endcase
      end
      es = cs && !ack && rd && (insert_idle || csel || idx_lt5 || (sn_byte && !nfirst_time) || idle_ch_sel);
      checks++;
      if (mux_sel != m || t_ack != ack || dataout_ce != dce || csw_ce != cce || csw_sel != csel ||
          eprom_sel != es || nsramcs != !(cs && !es) || nsramrw != rd || neprom_cs != !es ||
          index_ld != !started || fsm_started != started) begin
        failures++;
        if (failures < 10) $display("FAIL c %0d bit %0d mux %0d/%0d ack %b/%b", c, bit_cnt, mux_sel, m, t_ack, ack);
      end
      if (ack) n_ack++;
      if (cce) n_csw++;
      if (cs && !rd && m == SRC_UNLOAD) n_snw++;
      @(posedge clka);
      if (!started && c > 100 && bit_cnt == 3'd7) started = 1;
    end
    checks++;
    if (n_ack == 0 || n_csw == 0 || n_snw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
