// atm_tx_tb: the transmitter with its SRAM and EPROM. The PBX input
// carries {slot, frame mod 8} in every slot; a line monitor delineates the
// cells on the T1 output and checks every header and HEC, that user cells
// name active slots and carry that slot's bytes in frame order, the SN
// sequence per channel, idle-cell payload, all-ones dead slots and that no
// parity error is reported. A processor write/read checks the memory port.
`timescale 1ns/1ps
module atm_tx_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, fmb = 0, pbx_sin = 1;
  logic t1_sout, parity_err, t_req = 0, proc_we = 0, t_ack;
  logic [12:0] proc_addr = 0;
  logic [7:0] proc_wdata = 0, proc_rdata;
  logic [12:0] sram_addr, eprom_addr;
  logic [8:0] sram_wdata, sram_rdata;
  logic sram_ncs, sram_nrw, eprom_ncs;
  logic [7:0] eprom_rdata;
  logic insert_idle, dead_ts, cell_end, start_to_unload, nfirst_time;

  atm_tx dut (.*);
  sync_sram #(.AW(13), .DW(9)) u_sram (.clk(clka), .ncs(sram_ncs), .nrw(sram_nrw),
    .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));
  tx_eprom u_eprom (.clk(clka), .ncs(eprom_ncs), .addr(eprom_addr), .rdata(eprom_rdata));

  always #5 clka = ~clka;

  int cyc = 0, frame = 0, n_user = 0, n_idle = 0, n_sn = 0;
  logic [7:0] sh = 0;
  logic [7:0] win [5];
  int mon_cnt = 0, mon_ts = 0;
  bit mon_sync = 0, mon_idle = 0;
  logic [7:0] last_sn [32], last_pl [32];
  bit sn_seen [32], pl_seen [32];

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL t=%0t %s", $time, msg); end
  endtask

  function automatic logic [7:0] sn_next(logic [7:0] sn);
    logic [7:0] t [8] = '{8'h16, 8'h2C, 8'h3B, 8'h4F, 8'h58, 8'h62, 8'h75, 8'h00};
    return t[sn[6:4]];
  endfunction

  task automatic mon(logic [7:0] b);
    if (mon_sync) begin
      mon_cnt++;
      if (mon_cnt == 6 && !mon_idle) begin
        if (sn_seen[mon_ts]) begin check(b == sn_next(last_sn[mon_ts]), "SN sequence"); n_sn++; end
        last_sn[mon_ts] = b; sn_seen[mon_ts] = 1;
      end else if (mon_cnt > 6) begin
        if (mon_idle) check(b == IDLE_PAYLOAD, "idle payload");
        else begin
          check(b[7:3] == 5'(mon_ts), "payload slot");
          if (pl_seen[mon_ts]) check(b[2:0] == 3'(last_pl[mon_ts][2:0] + 3'd1), "payload order");
          last_pl[mon_ts] = b; pl_seen[mon_ts] = 1;
        end
      end
      if (mon_cnt == 53) mon_cnt = 0;
    end
    win[0] = win[1]; win[1] = win[2]; win[2] = win[3]; win[3] = win[4]; win[4] = b;
    if (!mon_sync || mon_cnt == 5) begin
      logic [31:0] h;
      h = {win[0], win[1], win[2], win[3]};
      if (mon_sync) check(header_hec(h) == win[4], "HEC");
      if (header_hec(h) == win[4]) begin
        if (!mon_sync) begin mon_sync = 1; mon_cnt = 5; end
        mon_idle = (h == IDLE_HEADER);
        if (mon_idle) n_idle++;
        else begin
          mon_ts = int'(h[8:4]);
          check(h == user_header(5'(mon_ts)) && ts_active(5'(mon_ts)), "user header");
          n_user++;
        end
      end
    end
  endtask

  // timing: FMB at the cycle ending slot 31 every second frame
  always @(posedge clka) begin
    int b, s;
    b = cyc % 8; s = (cyc / 8) % 32;
    sh = {sh[6:0], t1_sout};
    if (b == 7 && frame > 2) begin
      if (s % 4 == 0) check(sh == 8'hFF, "dead slot");
      else mon(sh);
      check(!parity_err, "parity");
    end
    cyc++;
    if (cyc % 256 == 0) frame++;
    b = cyc % 8; s = (cyc / 8) % 32;
    fmb <= (cyc % 512 == 511);
    pbx_sin <= {5'(s), 3'(frame)}[7 - b];
  end

  initial begin #60ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    for (int i = 0; i < 32; i++) begin last_sn[i] = 0; last_pl[i] = 0; sn_seen[i] = 0; pl_seen[i] = 0; end
    for (int i = 0; i < 5; i++) win[i] = 8'hFF;
    #2 rst = 1; #5 rst = 0;
    wait (frame == 300);
    @(negedge clka); t_req = 1; proc_we = 1; proc_addr = {5'd27, 2'd3, 6'd9}; proc_wdata = 8'h3C;
    @(negedge clka); while (!t_ack) @(negedge clka); while (t_ack) @(negedge clka);
    proc_we = 0;
    @(negedge clka); while (!t_ack) @(negedge clka); while (t_ack) @(negedge clka);
    t_req = 0;
    check(proc_rdata == 8'h3C, "processor read back");
    wait (frame == 400);
    check(start_to_unload && nfirst_time, "unloading started");
    check(n_user > 100 && n_idle > 20 && n_sn > 50, $sformatf("cells %0d idle %0d", n_user, n_idle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
