// atm_rx: receiver FPGA - ATM cells from the T1 line to the PBX highway.
//
// What it does: finds cells in the byte stream from the T1 side (skipping
// the dead byte slots), checks the header against the HEC ROM, and stores
// the 47 payload bytes of each user cell in the buffer ring (buffers 0..14)
// of the channel named by the VCI. Idle cells are recognised and dropped.
// The unload side plays one byte per channel and frame back onto the PBX
// highway, in the time slot named by the VCI, once Buffer_Delta buffers are
// loaded. Overruns (loader catches the unloader) drop the cell; underruns
// (unloader catches the loader) replay the last buffer; both are recorded
// in the channel status words.
// How: tdm_timing, dead_byte_counter and s2p_parity turn the line into
// bytes; rx_header_recog and rx_cell_delin delineate cells; rx_load_addr,
// rx_unload_addr and rx_init keep the buffer pointers; rx_fsm shares the
// SRAM per phase; p2s_parity_check sends RUL_Data_Out (all ones for
// channels that are not active and initialised) and checks its parity.
// Interface: external sync_sram (15-bit address, 9-bit word), rx_eprom and
// rx_hec_rom, all with one-CLKA read latency. Processor port: hold r_req
// until r_ack (phase 4 of a slot), read data on proc_rdata after r_ack.
// Event outputs are one-CLKA pulses for monitoring.
// Timing: CLKA rising edge only; the byte received in slot s is handled
// in slot s+1; the PBX byte of slot s+1 is read in slot s.
//
// Follows the original design in its blocks, memory map (buffer 15 of each
// slot holds the Index/Unload/Load status words at 61/62/63) and
// Buffer_Delta start-up. Own choices: the eight-phase memory plan of
// rx_fsm, synchronous memories, and RL_Data_In loading only on live bytes.
module atm_rx
  import atm_pkg::*;
(
  input  logic        clka,
  input  logic        rst,
  input  logic        fmb,
  input  logic        t1_sin,        // from the T1 framer (FAU data)
  output logic        pbx_sout,      // PBX highway, receive direction
  output logic        parity_err,
  input  logic [3:0]  buffer_delta,
  // processor port
  input  logic        r_req,
  input  logic        proc_we,
  input  logic [14:0] proc_addr,
  input  logic [7:0]  proc_wdata,
  output logic        r_ack,
  output logic [7:0]  proc_rdata,
  // SRAM
  output logic [14:0] sram_addr,
  output logic [8:0]  sram_wdata,
  output logic        sram_ncs,
  output logic        sram_nrw,
  input  logic [8:0]  sram_rdata,
  // EPROM and HEC ROM
  output logic [14:0] eprom_addr,
  output logic        eprom_ncs,
  input  logic [7:0]  eprom_rdata,
  output logic [5:0]  hec_addr,
  input  logic [7:0]  hec_rdata,
  // events and status
  output logic        ev_cell_ok,
  output logic        ev_hec_fail,
  output logic        ev_idle_cell,
  output logic        ev_overrun,
  output logic        ev_underrun,
  output logic        delta_reached,
  output logic        start_to_unload
);
  logic       fmb_sync, bit_eq7, slot_eq31;
  logic [2:0] bit_cnt;
  logic [4:0] slot;
  logic       dead_tc, dead_slot, byte_ce;
  logic [7:0] sp;
  logic       par_now;
  logic [8:0] rl_data_in;
  logic       header;
  logic [5:0] chnum, wr_idx;
  logic       correct_hec, ch_eq31;
  logic       sn_flag, wr_flag, last_flag, idle_done;
  src_sel_e   addr_sel, din_sel;
  idx_sel_e   idx_sel;
  logic       eprom_sel, eprom_sel_q, load_status_we;
  logic       ul_tp_ce, ul_hp_ce, ul_idx_ce, rl_tp_ce, rl_hp_ce, data_out_ce, proc_rd_ce;
  logic [14:0] load_addr, unload_addr;
  logic       overrun, underrun, inactive_ch;
  logic [3:0] rl_buf;
  logic [7:0] load_status, index_status, unload_status, status_mux;
  logic       rul_nfirst, rl_nfirst;
  logic [8:0] rd_bus, dout_q;
  logic       inactive_q;

  tdm_timing u_tim (
    .clka, .rst, .fmb, .fmb_sync, .bit_cnt, .bit_eq7, .slot
  );
  assign slot_eq31 = (slot == 5'd31);

  dead_byte_counter u_dead (.clka, .rst, .fmb(fmb_sync), .bit_eq7, .tc(dead_tc));

  s2p_parity u_s2p (.clka, .rst, .sin(t1_sin), .bit_eq7, .byte_now(sp), .par_now);

  // dead_slot: the byte now arriving was sent in a dead slot (Dead_TS of the
  // previous slot); RL_Data_In: the last live byte received, with its parity
  // bit (dead bytes are not loaded, so it always holds the byte before the
  // one being completed)
  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      dead_slot  <= 1'b1;
      rl_data_in <= '0;
    end else begin
      if (bit_eq7) dead_slot  <= dead_tc;
      if (byte_ce) rl_data_in <= {par_now, sp};
    end
  end
  assign byte_ce = bit_eq7 && !dead_slot;

  rx_header_recog u_hdr (.clka, .rst, .byte_ce, .sp, .header);

  assign hec_addr = chnum;

  rx_cell_delin u_delin (
    .clka, .rst, .bit_eq7, .byte_ce, .header, .sp, .prev_byte(rl_data_in[1:0]),
    .hec_data(hec_rdata), .chnum, .correct_hec, .hec_fail(ev_hec_fail),
    .ch_eq31, .sn_flag, .wr_flag, .last_flag, .idle_done, .wr_idx
  );

  rx_fsm u_fsm (
    .clka, .rst, .bit_cnt, .start_to_unload, .rul_nfirst, .rl_nfirst,
    .sn_flag, .wr_flag, .last_flag, .overrun, .r_req, .proc_we,
    .addr_sel, .din_sel, .idx_sel, .nsram_cs(sram_ncs), .nsram_rw(sram_nrw),
    .neprom_cs(eprom_ncs), .eprom_sel, .r_ack, .load_status_we,
    .ul_tp_ce, .ul_hp_ce, .ul_idx_ce, .rl_tp_ce, .rl_hp_ce, .data_out_ce,
    .proc_rd_ce
  );

  rx_load_addr u_ladr (
    .clka, .rst, .ts(chnum[4:0]), .idx_sel, .wr_idx, .rl_tp_ce, .rl_hp_ce,
    .sn_ce(sn_flag), .rd_data(rd_bus[3:0]), .sn_in(rl_data_in[6:4]),
    .rl_nfirst, .addr(load_addr), .overrun, .buf_value(rl_buf), .load_status
  );

  rx_unload_addr u_uadr (
    .clka, .rst, .slot, .idx_sel, .tp_ce(ul_tp_ce), .hp_ce(ul_hp_ce),
    .idx_ce(ul_idx_ce), .rd_data(rd_bus[7:0]), .addr(unload_addr),
    .underrun, .inactive_ch, .index_status, .unload_status
  );

  rx_init u_init (
    .clka, .rst, .bit_eq7, .slot_eq31, .load_status_we, .ch_eq31,
    .hp_new(rl_buf), .buffer_delta, .delta_reached, .start_to_unload,
    .rul_nfirst, .rl_nfirst
  );

  // Status word multiplexer (write data source 01)
  always_comb begin
    unique case (idx_sel)
      IXS_INDEX:  status_mux = index_status;
      IXS_UNLOAD: status_mux = unload_status;
      default:    status_mux = load_status;
    endcase
  end

  // Address and write data multiplexers
  always_comb begin
    unique case (addr_sel)
      SRC_PROC:   sram_addr = proc_addr;
      SRC_LOAD:   sram_addr = load_addr;
      default:    sram_addr = unload_addr;
    endcase
    unique case (din_sel)
      SRC_PROC:   sram_wdata = {par_bit(proc_wdata), proc_wdata};
      SRC_LOAD:   sram_wdata = {par_bit(status_mux), status_mux};
      default:    sram_wdata = rl_data_in;
    endcase
  end
  assign eprom_addr = sram_addr;

  assign rd_bus = eprom_sel_q ? {par_bit(eprom_rdata), eprom_rdata} : sram_rdata;

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      eprom_sel_q <= 1'b0;
      dout_q      <= 9'h1FF;
      inactive_q  <= 1'b1;
      proc_rdata  <= 8'h00;
    end else begin
      eprom_sel_q <= eprom_sel;
      if (data_out_ce) begin
        dout_q     <= rd_bus;
        inactive_q <= inactive_ch;
      end else if (bit_eq7 && !start_to_unload) begin
        inactive_q <= 1'b1;
      end
      if (proc_rd_ce) proc_rdata <= rd_bus[7:0];
    end
  end

  p2s_parity_check u_p2s (
    .clka, .rst, .load(bit_eq7), .din(dout_q), .force_ones(inactive_q),
    .chk_en(1'b1), .sout(pbx_sout), .parity_err
  );

  assign ev_cell_ok   = byte_ce && correct_hec;
  assign ev_idle_cell = idle_done;
  assign ev_overrun   = load_status_we && overrun;
  assign ev_underrun  = data_out_ce && underrun;
endmodule
