// rx_unload_addr: receiver unload-side addressing and unload status.
//
// In every time slot the receiver unloads one byte for the next PBX slot
// (channel = slot + 1). It reads that channel's unload status
// {Active, Init, UnderRun, 0, TP[3:0]} (tp_ce), load status HP (hp_ce) and
// index status (idx_ce), then reads the data byte at
// {channel, buffer, index}. At index 0 of an active, initialised channel
// the unload moves to the next buffer TP+1 (mod 15) if the load side has
// filled it (TP != HP); otherwise the buffer is played again and UnderRun
// is flagged. The index steps 0..46 once per frame for active, initialised
// channels. The index and unload status words written back are
// {2'b0, next index} and {Active, Init=1, UnderRun, 0, buffer}; Init set
// means the channel has been through one unload pass.
// addr index field: 61/62/63 for idx_sel 00/01/10 with buffer 15 forced
// (RUL_StatusBuffSel = !(S0 & S1)), the data index for idx_sel 11.
//
// Follows the original buffer comparison for the unload side (TP+1 against
// HP, UnderRun replays); advancing only for active, initialised channels is
// this design's choice.
module rx_unload_addr
  import atm_pkg::*;
(
  input  logic        clka,
  input  logic        rst,
  input  logic [4:0]  slot,
  input  idx_sel_e    idx_sel,
  input  logic        tp_ce,
  input  logic        hp_ce,
  input  logic        idx_ce,
  input  logic [7:0]  rd_data,
  output logic [14:0] addr,
  output logic        underrun,
  output logic        inactive_ch,
  output logic [7:0]  index_status,
  output logic [7:0]  unload_status
);
  logic [4:0] ch;
  logic [3:0] tp, hp, tp_plus1, buf_value;
  logic       init, active;
  logic [5:0] idx, next_idx;
  logic       run, idx_eq0, status_sel;
  logic [5:0] idx_field;

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      tp     <= '0;
      hp     <= '0;
      init   <= 1'b0;
      active <= 1'b0;
      idx    <= '0;
    end else begin
      if (tp_ce) begin
        active <= rd_data[7];
        init   <= rd_data[6];
        tp     <= rd_data[3:0];
      end
      if (hp_ce)  hp  <= rd_data[3:0];
      if (idx_ce) idx <= rd_data[5:0];
    end
  end

  assign ch          = slot + 5'd1;
  assign run         = active && init;
  assign inactive_ch = !run;
  assign idx_eq0     = (idx == 6'd0);
  assign tp_plus1    = (tp >= 4'd14) ? 4'd0 : tp + 4'd1;
  assign buf_value   = (run && idx_eq0 && (tp != hp)) ? tp_plus1 : tp;
  assign underrun    = run && idx_eq0 && (tp == hp);
  assign next_idx    = !run ? idx : (idx >= 6'(PAYLOAD_BYTES - 1)) ? 6'd0 : idx + 6'd1;

  assign index_status  = {2'b00, next_idx};
  assign unload_status = {active, 1'b1, underrun, 1'b0, buf_value};

  assign status_sel = !(idx_sel[0] && idx_sel[1]);
  always_comb begin
    unique case (idx_sel)
      IXS_INDEX:  idx_field = RX_INDEX_LOC;
      IXS_UNLOAD: idx_field = RX_UNLOAD_LOC;
      IXS_LOAD:   idx_field = RX_LOAD_LOC;
      default:    idx_field = idx;
    endcase
  end
  assign addr = {ch, status_sel ? RX_STATUS_BUF : buf_value, idx_field};
endmodule
