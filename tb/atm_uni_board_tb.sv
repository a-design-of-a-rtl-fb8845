// atm_uni_board_tb: end-to-end, full-size test of the ATM UNI board.
//
// The board runs at its default size (8k x 9 transmit SRAM, 32k x 9 receive
// SRAM, 21 channels) from its own clock generator: the TB drives C4M only
// and loops test_clka/test_fmb back to clka/fmb. The transmit line output
// is looped back to the receive line input through a selector that can
// pass it, flip bits, cut the line (all ones) or replace it by cells made
// by the TB. The PBX input carries, in slot t of frame n, the byte
// {t[4:0], n[2:0]}, so every byte names its slot and frame.
// Phases:
//   0 start-up with Buffer_Delta = 2 until the receiver unloads;
//   1 clean loopback: the PBX output must carry, in every active slot, that
//     slot's bytes in unbroken frame order, inactive slots all ones; both
//     processor ports write and read back; a parity bit is corrupted in each
//     SRAM (hierarchical write into the memory model) and both parity
//     checkers must report it;
//   2 line cut: the receiver must underrun; then it must find cells again;
//   3 bit errors on the line: header errors must be caught by the HEC check;
//   4 TB-made cells: one channel flooded back to back (overrun) and cells
//     with a wrong HEC;
//   5 pattern generator on: once the buffers have turned over, every
//     payload byte on the T1 line must be one of its values.
// All along, a line monitor delineates the transmitted cells and checks
// HEC, VCI, the AAL1 SN sequence per channel, payload order, idle cells and
// the 74/75 valid cells between idle cells; dead slots must be all ones.
// Every mechanism is counted and must occur at least once.
`timescale 1ns/1ps
module atm_uni_board_tb;
  import atm_pkg::*;

  int checks = 0, failures = 0;

  logic c4m = 1'b0, rst = 1'b0;
  logic clka, fmb, test_clka, test_fmb;
  logic test_pattern_en = 1'b0;
  logic fau_data_in = 1'b1, mod_fau_data_in, fau_data_out, mod_fau_data_out;
  logic [3:0] buffer_delta = 4'd2;
  logic t_req = 1'b0, t_we = 1'b0, t_ack;
  logic [12:0] t_addr = '0;
  logic [7:0]  t_wdata = '0, t_rdata;
  logic r_req = 1'b0, r_we = 1'b0, r_ack;
  logic [14:0] r_addr = '0;
  logic [7:0]  r_wdata = '0, r_rdata;
  logic tx_parity_err, rx_parity_err, tx_insert_idle, tx_dead_ts, tx_cell_end;
  logic tx_start_to_unload, tx_nfirst_time, rx_cell_ok, rx_hec_fail, rx_idle_cell;
  logic rx_overrun, rx_underrun, rx_delta_reached, rx_start_to_unload;

  assign clka = test_clka;
  assign fmb  = test_fmb;

  atm_uni_board dut (.*);

  always #10 c4m = ~c4m;

  // ---------------------------------------------------------------- line
  typedef enum logic [1:0] {L_LOOP, L_CUT, L_GEN} line_e;
  line_e line_sel = L_LOOP;
  logic  err_bit = 1'b0, gen_bit = 1'b1;
  assign fau_data_out = (line_sel == L_LOOP) ? (mod_fau_data_in ^ err_bit) :
                        (line_sel == L_GEN)  ? gen_bit : 1'b1;

  // ---------------------------------------------------------------- timing
  // cur_* describe the CLKA cycle ending at this edge
  int cur_bit = 0, cur_slot = 0, frame = 0;
  bit synced = 1'b0;
  int nb, ns;

  // mechanism counters
  int n_dead = 0, n_tx_idle = 0, n_tx_cells = 0, n_rx_ok = 0, n_rx_idle = 0;
  int n_hec_fail = 0, n_underrun = 0, n_overrun = 0, n_tack = 0, n_rack = 0;
  int n_tx_perr = 0, n_rx_perr = 0, n_pat = 0, n_seq_ok = 0, n_inactive_ok = 0;
  int n_sn_ok = 0, n_gen_cells = 0, n_bit_err = 0, n_nonpat = 0;
  bit pat_on = 1'b0;
  bit check_out = 1'b0, prev_tpe = 1'b0, prev_rpe = 1'b0;
  int phase = 0;

  // PBX input byte for slot t, frame n
  function automatic logic [7:0] pbx_byte(int t, int n);
    return {5'(t), 3'(n)};
  endfunction

  // TB cell generator state
  logic [7:0] gen_cell [53];
  int gen_idx = 53, gen_cnt = 0;
  logic [7:0] gen_byte = 8'hFF;
  logic [7:0] gen_sn = 8'h00;

  function automatic logic [7:0] sn_next(logic [7:0] sn);
    case (sn[7:4])
      4'h0: return 8'h16;  4'h1: return 8'h2C;  4'h2: return 8'h3B;
      4'h3: return 8'h4F;  4'h4: return 8'h58;  4'h5: return 8'h62;
      4'h6: return 8'h75;  4'h7: return 8'h00;  4'h8: return 8'h9D;
      4'h9: return 8'hA7;  4'hA: return 8'hB0;  4'hB: return 8'hC4;
      4'hC: return 8'hD3;  4'hD: return 8'hE9;  4'hE: return 8'hFE;
      default: return 8'h8A;
    endcase
  endfunction

  task automatic build_gen_cell();
    logic [31:0] h;
    h = user_header(5'd5);
    gen_cell[0] = h[31:24]; gen_cell[1] = h[23:16];
    gen_cell[2] = h[15:8];  gen_cell[3] = h[7:0];
    gen_cell[4] = header_hec(h) ^ ((gen_cnt % 4 == 3) ? 8'h01 : 8'h00);
    gen_sn = sn_next(gen_sn);
    gen_cell[5] = gen_sn;
    for (int i = 6; i < 53; i++) gen_cell[i] = 8'hA0 | 8'(i[3:0]);
    gen_cnt++;
  endtask

  // line monitor state
  logic [7:0] win [5];
  int  mon_cnt = 0;          // bytes since the last header start; 0 = hunting
  bit  mon_sync = 1'b0, mon_idle = 1'b0;
  int  mon_ts = 0, mon_payload_n = 0;
  logic [7:0] mon_prev_pl = '0;
  logic [7:0] last_sn [32];
  bit  sn_seen [32];
  logic [7:0] last_pl [32];
  bit  pl_seen [32];
  int  cells_since_idle = -1;
  logic [7:0] last_out [32];
  bit  out_seen [32];
  logic [7:0] tx_byte = '0, rx_byte = '0;

  function automatic bit is_pattern(logic [7:0] v);
    return v inside {8'h69, 8'h97, 8'h65, 8'hA6, 8'h5D, 8'h96, 8'h99, 8'h76, 8'h5A, 8'hD9};
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t phase %0d: %s", $time, phase, msg);
    end
  endtask

  task automatic monitor_byte(logic [7:0] b);
    if (mon_sync) begin
      mon_cnt++;
      if (mon_cnt == 6) begin                     // SN byte
        if (!mon_idle) begin
          if (sn_seen[mon_ts]) begin
            check(b == sn_next(last_sn[mon_ts]), $sformatf("SN ts %0d %h after %h", mon_ts, b, last_sn[mon_ts]));
            n_sn_ok++;
          end
          last_sn[mon_ts] = b;
          sn_seen[mon_ts] = 1'b1;
        end
      end else if (mon_cnt > 6) begin              // payload
        if (mon_idle) check(b == IDLE_PAYLOAD, "idle payload");
        else if (phase < 5 && frame > 4) begin
          check(b[7:3] == 5'(mon_ts), $sformatf("payload of ts %0d carries %h", mon_ts, b));
          if (pl_seen[mon_ts])
            check(b[2:0] == 3'(last_pl[mon_ts][2:0] + 3'd1), "payload order");
          last_pl[mon_ts] = b;
          pl_seen[mon_ts] = 1'b1;
        end else if (phase == 5 && pat_on) begin
          if (is_pattern(b)) n_pat++; else n_nonpat++;
        end
      end
      if (mon_cnt == 53) mon_cnt = 0;
    end
    win[0] = win[1]; win[1] = win[2]; win[2] = win[3]; win[3] = win[4]; win[4] = b;
    if (!mon_sync || mon_cnt == 5) begin
      logic [31:0] h;
      bit ok;
      h  = {win[0], win[1], win[2], win[3]};
      ok = (header_hec(h) == win[4]);
      if (mon_sync) check(ok, "HEC of a transmitted cell");
      if (ok) begin
        if (!mon_sync) begin mon_sync = 1'b1; mon_cnt = 5; end
        mon_idle = (h == IDLE_HEADER);
        if (!mon_idle) begin
          mon_ts = int'(h[8:4]);
          check(h == user_header(5'(mon_ts)), "user header");
          check(ts_active(5'(mon_ts)), "cell for an active slot");
          n_tx_cells++;
          if (cells_since_idle >= 0) cells_since_idle++;
        end else begin
          if (tx_start_to_unload) begin
            if (cells_since_idle >= 0)
              check(cells_since_idle == 74 || cells_since_idle == 75,
                    $sformatf("%0d valid cells between idle cells", cells_since_idle));
            if (n_tx_cells > 0) cells_since_idle = 0;
            n_tx_idle++;
          end
        end
      end
    end
  endtask

  always @(posedge clka) begin
    // --- sample the lines for the cycle just ended
    tx_byte = {tx_byte[6:0], mod_fau_data_in};
    rx_byte = {rx_byte[6:0], mod_fau_data_out};
    if (synced && cur_bit == 7) begin
      // transmit side
      if (cur_slot % 4 == 0) begin
        check(tx_byte == 8'hFF, "dead slot is all ones");
        n_dead++;
      end else begin
        monitor_byte(tx_byte);
      end
      check(tx_dead_ts == (cur_slot % 4 == 3), "Dead_TS");
      // receive side (PBX output)
      if (check_out) begin
        if (ts_active(5'(cur_slot))) begin
          check(rx_byte[7:3] == 5'(cur_slot), $sformatf("PBX out slot %0d got %h", cur_slot, rx_byte));
          if (out_seen[cur_slot]) begin
            check(rx_byte[2:0] == 3'(last_out[cur_slot][2:0] + 3'd1),
                  $sformatf("PBX out order slot %0d %h after %h", cur_slot, rx_byte, last_out[cur_slot]));
            n_seq_ok++;
          end
        end else begin
          check(rx_byte == 8'hFF, "inactive slot all ones");
          n_inactive_ok++;
        end
      end
      last_out[cur_slot] = rx_byte;
      out_seen[cur_slot] = 1'b1;
    end
    // --- events
    if (rx_cell_ok)  n_rx_ok++;
    if (rx_idle_cell) n_rx_idle++;
    if (rx_hec_fail) n_hec_fail++;
    if (rx_underrun) n_underrun++;
    if (rx_overrun)  n_overrun++;
    if (tx_parity_err && !prev_tpe) n_tx_perr++;
    if (rx_parity_err && !prev_rpe) n_rx_perr++;
    prev_tpe = tx_parity_err;
    prev_rpe = rx_parity_err;
    // --- advance the TB timing (FMB sampled now starts slot 0 bit 0)
    if (fmb) begin
      nb = 0; ns = 0;
      if (synced) frame++;
      synced = 1'b1;
    end else begin
      nb = (cur_bit + 1) % 8;
      ns = (cur_bit == 7) ? (cur_slot + 1) % 32 : cur_slot;
      if (cur_bit == 7 && cur_slot == 31) frame++;
    end
    cur_bit  = nb;
    cur_slot = ns;
    // --- drive the next bit
    fau_data_in <= pbx_byte(ns, frame)[7 - nb];
    if (nb == 0) begin
      if (ns % 4 == 0) gen_byte = 8'hFF;
      else begin
        if (gen_idx >= 53) begin build_gen_cell(); gen_idx = 0; n_gen_cells++; end
        gen_byte = gen_cell[gen_idx];
        gen_idx++;
      end
    end
    gen_bit <= gen_byte[7 - nb];
    if (phase == 3 && synced && ($urandom % 300) == 0) begin
      err_bit <= 1'b1;
      n_bit_err++;
    end else err_bit <= 1'b0;
  end

  // ---------------------------------------------------------------- helpers
  task automatic wait_frames(int n);
    int f0;
    f0 = frame;
    while (frame < f0 + n) @(posedge clka);
  endtask

  task automatic tx_access(bit we, logic [12:0] a, logic [7:0] d, output logic [7:0] q);
    // request at a falling edge; t_ack lasts the two CLKA cycles of the
    // PROC state; read data is registered at its end
    @(negedge clka);
    t_req = 1'b1; t_we = we; t_addr = a; t_wdata = d;
    @(negedge clka);
    while (!t_ack) @(negedge clka);
    while (t_ack) @(negedge clka);
    t_req = 1'b0;
    q = t_rdata;
    n_tack++;
  endtask

  task automatic rx_access(bit we, logic [14:0] a, logic [7:0] d, output logic [7:0] q);
    // r_ack lasts one CLKA cycle (phase 4); read data is registered at the
    // end of phase 5
    @(negedge clka);
    r_req = 1'b1; r_we = we; r_addr = a; r_wdata = d;
    @(negedge clka);
    while (!r_ack) @(negedge clka);
    @(negedge clka);
    r_req = 1'b0;
    @(negedge clka);
    q = r_rdata;
    n_rack++;
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    #20ms;
    $display("watchdog: simulation stopped in phase %0d", phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------------------------------------------------------- sequence
  initial begin
    logic [7:0] q;
    int f0;
    for (int i = 0; i < 32; i++) begin
      last_sn[i] = '0; sn_seen[i] = 1'b0; last_pl[i] = '0; pl_seen[i] = 1'b0;
      last_out[i] = '0; out_seen[i] = 1'b0;
    end
    for (int i = 0; i < 5; i++) win[i] = 8'hFF;
    for (int i = 0; i < 53; i++) gen_cell[i] = 8'hFF;
    #5 rst = 1'b1;                       // a rising edge for the async resets
    repeat (20) @(posedge c4m);
    rst = 1'b0;

    // phase 0: start-up
    phase = 0;
    f0 = frame;
    while (!rx_start_to_unload && frame < f0 + 600) @(posedge clka);
    check(tx_start_to_unload, "transmitter started unloading");
    check(rx_delta_reached, "receiver reached Buffer_Delta");
    check(rx_start_to_unload, "receiver started unloading");
    $display("phase 0 done at frame %0d", frame);
    wait_frames(3);

    // phase 1: clean loopback
    phase = 1;
    check_out = 1'b1;
    tx_access(1'b1, {5'd25, 2'd3, 6'd10}, 8'h5A, q);
    tx_access(1'b0, {5'd25, 2'd3, 6'd10}, 8'h00, q);
    check(q == 8'h5A, $sformatf("Tx processor read back %h", q));
    tx_access(1'b1, {5'd26, 2'd3, 6'd11}, 8'hC3, q);
    tx_access(1'b0, {5'd26, 2'd3, 6'd11}, 8'h00, q);
    check(q == 8'hC3, $sformatf("Tx processor read back %h", q));
    rx_access(1'b1, {5'd1, 4'd3, 6'd10}, 8'hA5, q);
    rx_access(1'b0, {5'd1, 4'd3, 6'd10}, 8'h00, q);
    check(q == 8'hA5, $sformatf("Rx processor read back %h", q));
    rx_access(1'b0, {5'd9, 4'd15, 6'd62}, 8'h00, q);
    check(q[7:6] == 2'b11, $sformatf("Rx unload status of slot 9 is %h", q));
    wait_frames(60);
    // corrupt one parity bit in each SRAM
    begin
      logic [4:0] ch; logic [1:0] bf; logic [3:0] tp;
      ch = dut.u_tx.u_uadr.chc;
      bf = dut.u_tx.u_uadr.bufc;
      dut.u_tx_sram.mem[{ch, bf, 6'd50}][8] = ~dut.u_tx_sram.mem[{ch, bf, 6'd50}][8];
      tp = dut.u_rx_sram.mem[{5'd9, 4'd15, 6'd62}][3:0];
      for (int i = 0; i < 47; i++)
        dut.u_rx_sram.mem[{5'd9, tp, 6'(i)}][8] = ~dut.u_rx_sram.mem[{5'd9, tp, 6'(i)}][8];
    end
    wait_frames(60);
    check(n_tx_perr > 0, "transmit parity error seen");
    check(n_rx_perr > 0, "receive parity error seen");
    check(n_underrun == 0, "no underrun on a clean line");
    check(n_overrun == 0, "no overrun on a clean line");
    $display("phase 1 done at frame %0d", frame);
    check_out = 1'b0;

    // phase 2: line cut
    phase = 2;
    line_sel = L_CUT;
    wait_frames(100);
    check(n_underrun > 0, "underrun while the line is cut");
    f0 = n_rx_ok;
    line_sel = L_LOOP;
    wait_frames(20);
    check(n_rx_ok > f0, "cells found again after the cut");

    // phase 3: bit errors
    phase = 3;
    f0 = n_hec_fail;
    wait_frames(150);
    check(n_hec_fail > f0, "HEC failures from bit errors");

    // phase 4: TB cells, one channel flooded, every fourth HEC wrong
    phase = 4;
    f0 = n_hec_fail;
    @(posedge clka);
    while (!(cur_bit == 7)) @(posedge clka);
    gen_idx = 53;
    line_sel = L_GEN;
    wait_frames(60);
    check(n_overrun > 0, "overrun when one channel is flooded");
    check(n_hec_fail > f0, "wrong HEC rejected");
    line_sel = L_LOOP;

    // phase 5: pattern generator
    phase = 5;
    test_pattern_en = 1'b1;
    // the transmit buffers hold about three cells' worth of frames
    wait_frames(160);
    pat_on = 1'b1;
    wait_frames(60);
    check(n_pat > 0 && n_nonpat == 0, $sformatf("only pattern values on the T1 line (%0d others)", n_nonpat));

    $display("mechanisms: dead=%0d tx_cells=%0d tx_idle=%0d rx_ok=%0d rx_idle=%0d hec_fail=%0d",
             n_dead, n_tx_cells, n_tx_idle, n_rx_ok, n_rx_idle, n_hec_fail);
    $display("            underrun=%0d overrun=%0d t_ack=%0d r_ack=%0d tx_perr=%0d rx_perr=%0d",
             n_underrun, n_overrun, n_tack, n_rack, n_tx_perr, n_rx_perr);
    $display("            sn_ok=%0d seq_ok=%0d inactive_ok=%0d pattern=%0d gen_cells=%0d bit_err=%0d",
             n_sn_ok, n_seq_ok, n_inactive_ok, n_pat, n_gen_cells, n_bit_err);
    check(n_dead > 0 && n_tx_cells > 0 && n_tx_idle > 0 && n_rx_ok > 0 && n_rx_idle > 0,
          "basic mechanisms occurred");
    check(n_sn_ok > 0 && n_seq_ok > 0 && n_inactive_ok > 0 && n_tack > 0 && n_rack > 0,
          "checked paths occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
