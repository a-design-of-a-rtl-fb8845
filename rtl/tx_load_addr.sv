// tx_load_addr: transmitter load-side SRAM addressing.
//
// The channel field comes from the slot mapping (tx_ts_map). The index
// counter holds the payload byte position, IDX_FIRST..IDX_LAST (6..52, so
// that header and SN positions 0..5 stay free and the unload side can count
// 0..52 straight through); it advances once per T1 frame, at the byte
// boundary of channel 20, once the FSM has started, and is reloaded with
// IDX_FIRST by index_ld or after IDX_LAST (that reload is TLBufferCntCE).
// The 2-bit buffer counter cycles through the NBUF data buffers on
// TLBufferCntCE. StartToUnload is set by the first TLBufferCntCE (every
// channel holds a full payload) and cleared only by reset.
// addr = {channel[4:0], buffer[1:0], index[5:0]}.
//
// Follows the original counters (index 6..52 once per frame, buffers 0..2,
// StartToUnload after the first buffer); the reset values are this design's.
module tx_load_addr #(
  parameter int unsigned IDX_FIRST = 6,
  parameter int unsigned IDX_LAST  = 52,
  parameter int unsigned NBUF      = 3
) (
  input  logic        clka,
  input  logic        rst,
  input  logic [4:0]  slot,
  input  logic        bit_eq7,
  input  logic        fsm_started,
  input  logic        index_ld,
  output logic [12:0] addr,
  output logic        start_to_unload
);
  logic [4:0] ch;
  logic       eq20, buf_cnt_ce;
  logic [5:0] idx;
  logic [1:0] bufc;
  logic       idx_ce;

  tx_ts_map u_map (.ts(slot), .ch(ch), .eq20(eq20));

  assign idx_ce     = bit_eq7 && eq20 && fsm_started;
  assign buf_cnt_ce = idx_ce && (idx == 6'(IDX_LAST));

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      idx             <= 6'(IDX_FIRST);
      bufc            <= '0;
      start_to_unload <= 1'b0;
    end else begin
      if (index_ld || buf_cnt_ce) idx <= 6'(IDX_FIRST);
      else if (idx_ce)            idx <= idx + 6'd1;
      if (buf_cnt_ce)
        bufc <= (bufc == 2'(NBUF - 1)) ? 2'd0 : bufc + 2'd1;
      start_to_unload <= start_to_unload | buf_cnt_ce;
    end
  end

  assign addr = {ch, bufc, idx};
endmodule
