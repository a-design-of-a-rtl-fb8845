// rx_cell_delin: receiver cell delineation and load-side sequencing.
//
// State machine, stepping on active received bytes (byte_ce):
//   HUNT     wait for Header (third header byte seen by rx_header_recog);
//   CHLATCH  fourth header byte: latch the channel number
//            {third byte[1:0], fourth byte[7:4]} (ChNumCE);
//   HECCHK   fifth byte: CorrectHEC = (byte == HEC ROM[channel]) and the
//            channel is the idle channel (0) or a user channel (bit 5 set).
//            Correct -> SN; otherwise back to HUNT, or straight to CHLATCH
//            when the byte itself completes a new header pattern;
//   SN       sixth byte (AAL1 SN byte) -> PAYLOAD;
//   PAYLOAD  47 payload bytes, then HUNT.
// Because the SRAM writes for a byte happen in the slot after the byte was
// received, the FSM hands the receiver FSM one-slot flags, set at the byte
// boundary and cleared at the next one: sn_flag (SN byte in RL_Data_In),
// wr_flag (payload byte to write, not for idle cells) with its index
// wr_idx (0..46), and last_flag (47th payload byte: write the load status).
// Idle cells are delineated like user cells but produce no writes.
// Timing: sp is the byte completed in the current bit-7 cycle, prev_byte the
// byte before it (RL_Data_In register); hec_data comes from rx_hec_rom,
// addressed by chnum, valid a byte time after ChNumCE.
//
// Follows the original scenario of header hunt, channel latch, HEC check,
// SN and payload. The state names and the one-slot flag hand-off are this
// design's own.
module rx_cell_delin
  import atm_pkg::*;
(
  input  logic       clka,
  input  logic       rst,
  input  logic       bit_eq7,
  input  logic       byte_ce,
  input  logic       header,
  input  logic [7:0] sp,
  input  logic [1:0] prev_byte,    // bits 1:0 of the previous byte
  input  logic [7:0] hec_data,
  output logic [5:0] chnum,
  output logic       correct_hec,
  output logic       hec_fail,
  output logic       ch_eq31,
  output logic       sn_flag,
  output logic       wr_flag,
  output logic       last_flag,
  output logic       idle_done,
  output logic [5:0] wr_idx
);
  typedef enum logic [2:0] {
    D_HUNT    = 3'd0,
    D_CHLATCH = 3'd1,
    D_HECCHK  = 3'd2,
    D_SN      = 3'd3,
    D_PAYLOAD = 3'd4
  } delin_state_e;

  delin_state_e state;
  logic [5:0]   pcnt;
  logic         ok_header, last_byte, idle_cell;

  assign idle_cell   = (chnum == 6'd0);
  assign ch_eq31     = (chnum == 6'h3F);
  assign ok_header   = idle_cell || chnum[5];
  assign correct_hec = (state == D_HECCHK) && (hec_data == sp) && ok_header;
  assign hec_fail    = byte_ce && (state == D_HECCHK) && !correct_hec;
  assign last_byte   = (pcnt == 6'(PAYLOAD_BYTES - 1));

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      state     <= D_HUNT;
      chnum     <= '0;
      pcnt      <= '0;
      sn_flag   <= 1'b0;
      wr_flag   <= 1'b0;
      last_flag <= 1'b0;
      idle_done <= 1'b0;
      wr_idx    <= '0;
    end else begin
      if (bit_eq7) begin
        sn_flag   <= byte_ce && (state == D_SN) && !idle_cell;
        wr_flag   <= byte_ce && (state == D_PAYLOAD) && !idle_cell;
        last_flag <= byte_ce && (state == D_PAYLOAD) && !idle_cell && last_byte;
        idle_done <= byte_ce && (state == D_PAYLOAD) && idle_cell && last_byte;
      end
      if (byte_ce) begin
        unique case (state)
          D_HUNT:    if (header) state <= D_CHLATCH;
          D_CHLATCH: begin
            chnum <= {prev_byte[1:0], sp[7:4]};
            state <= D_HECCHK;
          end
          D_HECCHK:  if (correct_hec) state <= D_SN;
                     else if (header) state <= D_CHLATCH;
                     else             state <= D_HUNT;
          D_SN: begin
            pcnt  <= '0;
            state <= D_PAYLOAD;
          end
          D_PAYLOAD: begin
            wr_idx <= pcnt;
            pcnt   <= pcnt + 6'd1;
            if (last_byte) state <= D_HUNT;
          end
          default: state <= D_HUNT;
        endcase
      end
    end
  end
endmodule
