// atm_rx_tb: the receiver FPGA with its SRAM (full 32k x 9), EPROM and
// HEC ROM, fed with a T1 byte stream made by the TB: user cells for the
// 21 active channels in turn, an idle cell after every 74 user cells, and
// all ones in the dead slots. Payload byte k of channel t carries
// {t[4:0], k[2:0]}, so the PBX output of an active slot must show its own
// slot number with the low three bits counting up by one per frame;
// inactive slots must be all ones.
// Phases: 0 start-up (Buffer_Delta = 3) until unloading starts;
//   1 clean stream: output order checked, processor write and read-back;
//   2 extra cells with a wrong HEC mixed in: must be rejected, order kept;
//   3 one channel flooded back to back: overruns;
//   4 line cut (all ones): underruns.
// Each mechanism is counted and must occur.
`timescale 1ns/1ps
module atm_rx_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, fmb = 0, t1_sin = 1'b1;
  logic pbx_sout, parity_err;
  logic [3:0] buffer_delta = 4'd3;
  logic r_req = 0, proc_we = 0, r_ack;
  logic [14:0] proc_addr = '0;
  logic [7:0] proc_wdata = '0, proc_rdata;
  logic [14:0] sram_addr, eprom_addr;
  logic [8:0] sram_wdata, sram_rdata;
  logic sram_ncs, sram_nrw, eprom_ncs;
  logic [7:0] eprom_rdata, hec_rdata;
  logic [5:0] hec_addr;
  logic ev_cell_ok, ev_hec_fail, ev_idle_cell, ev_overrun, ev_underrun;
  logic delta_reached, start_to_unload;

  atm_rx dut (.*);
  sync_sram #(.AW(RX_AW), .DW(9)) u_sram (.clk(clka), .ncs(sram_ncs), .nrw(sram_nrw),
    .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata));
  rx_eprom u_eprom (.clk(clka), .ncs(eprom_ncs), .addr(eprom_addr), .rdata(eprom_rdata));
  rx_hec_rom u_hec (.clk(clka), .addr(hec_addr), .rdata(hec_rdata));
  always #5 clka = ~clka;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures <= 20) $display("FAIL t=%0t phase %0d: %s", $time, phase, msg); end
  endtask

  int phase = 0;
  // ---------------------------------------------------------- cell source
  int act_ts [21];
  int rr = 0, users_since_idle = 0;
  logic [2:0] seq [32];
  logic [7:0] cbuf [53];
  int cidx = 53;
  logic [7:0] sn [32];
  int n_bad_sent = 0;

  task automatic build_cell();
    logic [31:0] h;
    int ts;
    bit bad;
    bad = (phase == 2) && ($urandom % 8 == 0);
    if (!bad && users_since_idle == 74) begin
      h = IDLE_HEADER; users_since_idle = 0;
      for (int i = 5; i < 53; i++) cbuf[i] = IDLE_PAYLOAD;
    end else begin
      ts = (phase == 3) ? 5 : act_ts[rr];
      h = user_header(5'(ts));
      cbuf[5] = {1'b0, 3'(sn[ts]), 4'h0};
      if (bad) begin
        for (int i = 6; i < 53; i++) cbuf[i] = 8'($urandom);
        n_bad_sent++;
      end else begin
        sn[ts]++;
        for (int i = 6; i < 53; i++) begin cbuf[i] = {5'(ts), seq[ts]}; seq[ts]++; end
        if (phase != 3) rr = (rr + 1) % 21;
        users_since_idle++;
      end
    end
    cbuf[0] = h[31:24]; cbuf[1] = h[23:16]; cbuf[2] = h[15:8]; cbuf[3] = h[7:0];
    cbuf[4] = header_hec(h) ^ (bad ? 8'h04 : 8'h00);
  endtask

  // ---------------------------------------------------------- timing / line
  int cur_bit = 0, cur_slot = 0, frame = 0, nb, ns, cyc = 0;
  bit synced = 0, check_out = 0;
  logic [7:0] byte_out = '0, rx_byte = '0;
  logic [7:0] last_out [32];
  bit out_seen [32];
  int n_ok = 0, n_hec = 0, n_idle = 0, n_ovr = 0, n_und = 0, n_seq = 0, n_inact = 0, n_rack = 0;

  always @(posedge clka) begin
    rx_byte = {rx_byte[6:0], pbx_sout};
    if (synced && cur_bit == 7 && check_out) begin
      if (ts_active(5'(cur_slot))) begin
        check(rx_byte[7:3] == 5'(cur_slot), $sformatf("PBX slot %0d got %h", cur_slot, rx_byte));
        if (out_seen[cur_slot]) begin
          check(rx_byte[2:0] == 3'(last_out[cur_slot][2:0] + 3'd1),
                $sformatf("order slot %0d %h after %h", cur_slot, rx_byte, last_out[cur_slot]));
          n_seq++;
        end
      end else begin
        check(rx_byte == 8'hFF, "inactive slot all ones");
        n_inact++;
      end
    end
    if (synced && cur_bit == 7) begin last_out[cur_slot] = rx_byte; out_seen[cur_slot] = 1'b1; end
    if (ev_cell_ok) n_ok++;
    if (ev_hec_fail) n_hec++;
    if (ev_idle_cell) n_idle++;
    if (ev_overrun) n_ovr++;
    if (ev_underrun) n_und++;
    // FMB every 512 CLKA; sampled here, the next cycle is slot 0 bit 0
    if (fmb) begin nb = 0; ns = 0; if (synced) frame++; synced = 1'b1; end
    else begin
      nb = (cur_bit + 1) % 8;
      ns = (cur_bit == 7) ? (cur_slot + 1) % 32 : cur_slot;
      if (cur_bit == 7 && cur_slot == 31) frame++;
    end
    cur_bit = nb; cur_slot = ns;
    if (nb == 0) begin
      if (ns % 4 == 0 || phase == 4 || !synced) byte_out = 8'hFF;
      else begin
        if (cidx >= 53) begin build_cell(); cidx = 0; end
        byte_out = cbuf[cidx]; cidx++;
      end
    end
    t1_sin <= byte_out[7 - nb];
    cyc++;
    fmb <= (cyc % 512 == 511);
  end

  task automatic wait_frames(int n);
    int f0;
    f0 = frame;
    while (frame < f0 + n) @(posedge clka);
  endtask

  task automatic proc_access(bit we, logic [14:0] a, logic [7:0] d, output logic [7:0] q);
    @(negedge clka);
    r_req = 1'b1; proc_we = we; proc_addr = a; proc_wdata = d;
    @(negedge clka);
    while (!r_ack) @(negedge clka);
    @(negedge clka);
    r_req = 1'b0;
    @(negedge clka);
    q = proc_rdata;
    n_rack++;
  endtask

  initial begin #30ms; $display("watchdog in phase %0d", phase); $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    logic [7:0] q;
    int k, f0, b0;
    k = 0;
    for (int t = 0; t < 32; t++) begin
      seq[t] = '0; sn[t] = '0; last_out[t] = '0; out_seen[t] = 1'b0;
      if (ts_active(5'(t))) begin act_ts[k] = t; k++; end
    end
    for (int i = 0; i < 53; i++) cbuf[i] = 8'hFF;
    check(k == 21, "21 active slots");
    #2 rst = 1; #5 rst = 0;

    phase = 0;
    while (!start_to_unload && frame < 400) @(posedge clka);
    check(delta_reached && start_to_unload, "unloading started");
    wait_frames(4);

    phase = 1;
    for (int t = 0; t < 32; t++) out_seen[t] = 1'b0;
    check_out = 1'b1;
    proc_access(1'b1, {5'd2, 4'd7, 6'd20}, 8'h3C, q);
    proc_access(1'b0, {5'd2, 4'd7, 6'd20}, 8'h00, q);
    check(q == 8'h3C, $sformatf("processor read back %h", q));
    proc_access(1'b0, {5'd9, 4'd15, 6'd62}, 8'h00, q);
    check(q[7:6] == 2'b11, $sformatf("unload status of an active channel %h", q));
    wait_frames(150);
    check(!parity_err, "no parity error on a clean stream");

    phase = 2;
    b0 = n_hec;
    wait_frames(200);
    check(n_hec > b0 && n_bad_sent > 0, "bad HEC cells rejected");
    check_out = 1'b0;

    phase = 3;
    b0 = n_ovr;
    wait_frames(150);
    check(n_ovr > b0, "overrun on a flooded channel");

    phase = 4;
    b0 = n_und;
    wait_frames(100);
    check(n_und > b0, "underrun on a cut line");

    $display("mechanisms: ok=%0d hec_fail=%0d idle=%0d overrun=%0d underrun=%0d seq=%0d inactive=%0d rack=%0d",
             n_ok, n_hec, n_idle, n_ovr, n_und, n_seq, n_inact, n_rack);
    check(n_ok > 0 && n_idle > 0 && n_seq > 1000 && n_inact > 0, "mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
