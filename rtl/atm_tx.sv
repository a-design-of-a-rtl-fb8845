// atm_tx: transmitter FPGA - PBX highway to ATM cells on the T1 line.
//
// What it does: takes the 2.048 Mb/s PBX highway (32 time slots, one byte
// each), stores the bytes of the 21 carried slots in the transmitter SRAM,
// one 47-byte payload per channel and buffer (three buffers in rotation),
// and sends the stored payloads as ATM cells (5-byte header, AAL1 SN byte,
// 47 payload bytes) in the 24 live byte slots of the T1 side. Every fourth
// byte slot (Dead_TS) is sent as all ones, because the T1 line carries only
// 24 of the 32 byte slots of the 2.048 MHz CLKA frame. Idle cells are put in
// by tx_idle_insert to match the cell rate to the channel rate.
// How: tdm_timing gives the bit and slot counters; s2p_parity turns the PBX
// line into 9-bit words (byte + parity) held in the DataIn register;
// tx_load_addr and tx_unload_addr give the two SRAM addresses; tx_fsm
// shares the memory between load, unload and processor once per C1 period;
// headers, CSWs, first SNs and the idle cell come from the EPROM; the byte
// read is held in TUL_Data_Out and shifted out by p2s_parity_check, which
// also checks the parity of every SRAM byte it sends. Of the channel status
// word only bit 7 (channel active) is used, so only that bit is kept.
// Interface: memory ports go to an external sync_sram (13-bit address, 9-bit
// words) and tx_eprom (8-bit words); both have one-CLKA read latency.
// Processor port: hold t_req (with proc_addr/proc_wdata/proc_we) until t_ack;
// the access happens in the PROC cycle, read data appears on proc_rdata on
// the clock after t_ack falls.
// Timing: everything is clocked by CLKA (2.048 MHz) rising edges; C1 and
// C256k of the document are clock enables here. A PBX byte received in slot
// s is written during slot s+1; the T1 byte sent in slot s+1 is read during
// slot s and loaded into the shift register at the end of slot s.
module atm_tx
  import atm_pkg::*;
(
  input  logic        clka,
  input  logic        rst,
  input  logic        fmb,
  input  logic        pbx_sin,      // PBX highway, transmit direction
  output logic        t1_sout,      // to the T1 framer (MTS data)
  output logic        parity_err,
  // processor port
  input  logic        t_req,
  input  logic        proc_we,
  input  logic [12:0] proc_addr,
  input  logic [7:0]  proc_wdata,
  output logic        t_ack,
  output logic [7:0]  proc_rdata,
  // SRAM
  output logic [12:0] sram_addr,
  output logic [8:0]  sram_wdata,
  output logic        sram_ncs,
  output logic        sram_nrw,
  input  logic [8:0]  sram_rdata,
  // EPROM
  output logic [12:0] eprom_addr,
  output logic        eprom_ncs,
  input  logic [7:0]  eprom_rdata,
  // status
  output logic        insert_idle,
  output logic        dead_ts,
  output logic        cell_end,
  output logic        start_to_unload,
  output logic        nfirst_time
);
  logic       fmb_sync, bit_eq7, c1_en;
  logic [2:0] bit_cnt;
  logic [4:0] slot;
  logic [7:0] byte_now;
  logic       par_now;
  logic [8:0] datain_q;
  logic [12:0] load_addr, unload_addr;
  logic       idx_eq0, sn_byte, idx_lt5, idle_ch_sel;
  logic       index_ld, fsm_started, nsramcs, nsramrw, neprom_cs, eprom_sel;
  logic       dataout_ce, csw_ce, csw_sel;
  src_sel_e   mux_sel;
  logic [8:0] sn_out, rd_bus, dataout_q;
  logic       csw_active;
  logic       eprom_sel_q, eprom_data_q;

  tdm_timing u_tim (
    .clka, .rst, .fmb, .fmb_sync, .bit_cnt, .bit_eq7, .slot
  );
  assign c1_en = bit_cnt[0];   // last CLKA cycle of a C1 period

  s2p_parity u_s2p (.clka, .rst, .sin(pbx_sin), .bit_eq7, .byte_now, .par_now);

  // DataIn register: the received PBX byte with its parity bit
  always_ff @(posedge clka or posedge rst) begin
    if (rst)          datain_q <= '0;
    else if (bit_eq7) datain_q <= {par_now, byte_now};
  end

  dead_byte_counter u_dead (.clka, .rst, .fmb(fmb_sync), .bit_eq7, .tc(dead_ts));

  tx_load_addr u_ladr (
    .clka, .rst, .slot, .bit_eq7, .fsm_started, .index_ld,
    .addr(load_addr), .start_to_unload
  );

  tx_unload_addr u_uadr (
    .clka, .rst, .bit_eq7, .fsm_started, .dead_ts, .start_to_unload,
    .insert_idle, .csw_sel, .csw_active,
    .addr(unload_addr), .idx_eq0, .sn_byte, .idx_lt5,
    .ch_inc(cell_end), .idle_ch_sel, .nfirst_time
  );

  tx_idle_insert u_idle (
    .clka, .rst, .ce(start_to_unload && cell_end),
    .insert_idle
  );

  tx_fsm u_fsm (
    .clka, .rst, .bit_cnt, .fmb_sync, .dead_ts, .idx_eq0,
    .sn_byte, .idx_lt5, .insert_idle, .idle_ch_sel, .nfirst_time, .t_req,
    .proc_we, .index_ld, .fsm_started, .t_ack, .mux_sel, .nsramcs, .nsramrw,
    .neprom_cs, .eprom_sel, .dataout_ce, .csw_ce, .csw_sel
  );

  tx_sn_gen u_sn (.sn_in(dataout_q[7:4]), .sn_out);

  // Address and data multiplexers
  always_comb begin
    unique case (mux_sel)
      SRC_PROC: begin
        sram_addr  = proc_addr;
        sram_wdata = {par_bit(proc_wdata), proc_wdata};
      end
      SRC_LOAD: begin
        sram_addr  = load_addr;
        sram_wdata = datain_q;
      end
      SRC_UNLOAD: begin
        sram_addr  = unload_addr;
        sram_wdata = sn_out;
      end
      default: begin
        sram_addr  = unload_addr;
        sram_wdata = datain_q;
      end
    endcase
  end
  assign eprom_addr = sram_addr;
  assign sram_ncs   = nsramcs;
  assign sram_nrw   = nsramrw;
  assign eprom_ncs  = neprom_cs;

  // Read bus: EPROM bytes get no parity bit; they are never parity checked
  assign rd_bus = eprom_sel_q ? {1'b0, eprom_rdata} : sram_rdata;

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      eprom_sel_q  <= 1'b0;
      eprom_data_q <= 1'b1;
      dataout_q    <= 9'h1FF;
      csw_active   <= 1'b0;
      proc_rdata   <= 8'h00;
    end else begin
      eprom_sel_q <= eprom_sel;
      if (c1_en) begin
        if (dataout_ce) begin
          dataout_q    <= rd_bus;
          eprom_data_q <= eprom_sel_q;
        end
        if (csw_ce) csw_active <= rd_bus[7];
        if (t_ack)  proc_rdata <= rd_bus[7:0];
      end
    end
  end

  p2s_parity_check u_p2s (
    .clka, .rst, .load(bit_eq7), .din(dataout_q), .force_ones(dead_ts),
    .chk_en(!eprom_data_q), .sout(t1_sout), .parity_err
  );
endmodule
