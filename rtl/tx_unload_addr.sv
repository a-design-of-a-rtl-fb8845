// tx_unload_addr: transmitter unload-side SRAM/EPROM addressing.
//
// Index counter 0..IDX_LAST (53 bytes of a cell) advances at every byte
// boundary once the FSM has started, except before a dead slot (Dead_TS),
// so that the byte read for a dead slot is read again. TUL_ChInc marks the
// end of a cell. The channel counter 0..NCH-1 advances on TUL_ChInc when
// StartToUnload is set and no idle cell is being sent; its wrap
// (TULBufferCntCE) advances the buffer counter 0..2 and sets the first-time
// register NFirstTime.
// Forcing: CSW_Sel forces index 63 (channel status word); IdleCh_Sel forces
// channel 31 (idle cell) when unloading has not started, an idle cell is due
// or the channel's CSW bit 7 says inactive, but never while the CSW itself is
// read; the buffer field is forced to 3 (status buffer) for the header bytes
// (index < 5), the SN byte (index 5), the CSW and the idle cell.
// addr = {channel[4:0], buffer[1:0], index[5:0]}.
//
// Follows the original counters and forcing rules; where the printed
// equations and the text disagree (idle channel select, channel counter
// enable) the text was followed.
module tx_unload_addr #(
  parameter int unsigned NCH      = 21,
  parameter int unsigned IDX_LAST = 52
) (
  input  logic        clka,
  input  logic        rst,
  input  logic        bit_eq7,
  input  logic        fsm_started,
  input  logic        dead_ts,
  input  logic        start_to_unload,
  input  logic        insert_idle,
  input  logic        csw_sel,
  input  logic        csw_active,
  output logic [12:0] addr,
  output logic        idx_eq0,
  output logic        sn_byte,
  output logic        idx_lt5,
  output logic        ch_inc,
  output logic        idle_ch_sel,
  output logic        nfirst_time
);
  import atm_pkg::*;

  logic [5:0] idx;
  logic [4:0] chc;
  logic [1:0] bufc;
  logic       idx_ce, ch_ce, buf_ce, status_force;

  assign idx_ce = bit_eq7 && fsm_started && !dead_ts;
  assign ch_inc = idx_ce && (idx == 6'(IDX_LAST));
  assign ch_ce  = ch_inc && start_to_unload && !insert_idle;
  assign buf_ce = ch_ce && (chc == 5'(NCH - 1));

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      idx         <= '0;
      chc         <= '0;
      bufc        <= '0;
      nfirst_time <= 1'b0;
    end else begin
      if (ch_inc)      idx <= '0;
      else if (idx_ce) idx <= idx + 6'd1;
      if (buf_ce)      chc <= '0;
      else if (ch_ce)  chc <= chc + 5'd1;
      if (buf_ce)      bufc <= (bufc == 2'd2) ? 2'd0 : bufc + 2'd1;
      nfirst_time <= nfirst_time | buf_ce;
    end
  end

  // Index_Value_Decoder
  assign idx_eq0  = (idx == 6'd0);
  assign sn_byte  = (idx == TX_SN_IDX);
  assign idx_lt5  = (idx < 6'd5);

  assign idle_ch_sel  = !csw_sel && (!start_to_unload || insert_idle || !csw_active);
  assign status_force = sn_byte || idx_lt5 || csw_sel || idle_ch_sel;

  assign addr = { idle_ch_sel  ? TX_IDLE_CH    : chc,
                  status_force ? TX_STATUS_BUF : bufc,
                  csw_sel      ? TX_CSW_IDX    : idx };
endmodule
