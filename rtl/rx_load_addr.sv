// rx_load_addr: receiver load-side addressing and load status.
//
// For each received user cell the receiver FSM reads, at the SN byte, the
// channel's unload status (RL_TP_CE: TP = buffer being unloaded) and load
// status (RL_HP_CE: HP = buffer last loaded). The cell then goes to
// buffer HP+1 (mod 15, buffers 0..14), unless that is the buffer being
// unloaded: then the cell is an overrun, it is not written, and HP stays.
// Overrun is only judged once the load side has initialised (rl_nfirst),
// because the EPROM values before that are all zero. The SN field of the
// SN byte (bits 6:4) is captured for the load status word
// {OverRun, SN[2:0], HP[3:0]}, written after the 47th payload byte.
// addr = {time slot[14:10], buffer[9:6], index[5:0]}; the index field is the
// payload index for idx_sel 00 and the status location 62/63 for 01/10, in
// which case buffer 15 is forced (RL_StatusBuffSel = S0 ^ S1).
//
// Follows the original buffer comparison (HP+1 against TP, OverRun keeps
// HP); the 15-buffer wrap and suppressing the write on overrun are stated
// choices where the original is brief.
module rx_load_addr
  import atm_pkg::*;
(
  input  logic        clka,
  input  logic        rst,
  input  logic [4:0]  ts,
  input  idx_sel_e    idx_sel,
  input  logic [5:0]  wr_idx,
  input  logic        rl_tp_ce,
  input  logic        rl_hp_ce,
  input  logic        sn_ce,
  input  logic [3:0]  rd_data,      // HP/TP field of the status word read
  input  logic [2:0]  sn_in,        // SN field of the SN byte in RL_Data_In
  input  logic        rl_nfirst,
  output logic [14:0] addr,
  output logic        overrun,
  output logic [3:0]  buf_value,
  output logic [7:0]  load_status
);
  logic [3:0] rl_tp, rl_hp, hp_plus1;
  logic [2:0] sn_q;
  logic       status_sel;
  logic [5:0] idx_field;

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      rl_tp <= '0;
      rl_hp <= '0;
      sn_q  <= '0;
    end else begin
      if (rl_tp_ce) rl_tp <= rd_data;
      if (rl_hp_ce) rl_hp <= rd_data;
      if (sn_ce)    sn_q  <= sn_in;
    end
  end

  assign hp_plus1    = (rl_hp >= 4'd14) ? 4'd0 : rl_hp + 4'd1;
  assign overrun     = (hp_plus1 == rl_tp) && rl_nfirst;
  assign buf_value   = overrun ? rl_hp : hp_plus1;
  assign load_status = {overrun, sn_q, buf_value};

  assign status_sel = idx_sel[0] ^ idx_sel[1];
  always_comb begin
    unique case (idx_sel)
      IXS_UNLOAD: idx_field = RX_UNLOAD_LOC;
      IXS_LOAD:   idx_field = RX_LOAD_LOC;
      default:    idx_field = wr_idx;
    endcase
  end
  assign addr = {ts, status_sel ? RX_STATUS_BUF : buf_value, idx_field};
endmodule
