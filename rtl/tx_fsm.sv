// tx_fsm: transmitter control FSM and memory selection.
//
// The FSM steps once per C1 period (two CLKA cycles), four steps per time
// slot, so every slot gets four memory cycles:
//   LOAD  write the byte in the DataIn register to the SRAM (load address);
//   UL1   index 0: read the channel status word (CSW);
//         otherwise: read the byte to send (SN byte included) into TUL_Data_Out;
//   UL2   index 0: read the first header byte into TUL_Data_Out;
//         SN byte: write the next SN (from tx_sn_gen) back to the SRAM;
//   PROC  free cycle, granted to the processor port when t_req is high.
// These are options 1, 2 and 3 of the document's functional timing. UL1/UL2
// do nothing while Dead_TS is high, because the byte read then would be
// replaced by the dead-slot pattern. After reset the FSM waits in INIT
// (asserting the index load) until FMB has been seen and a slot ends, then
// starts with LOAD at slot 1 and sets FSM_Started for good.
// The read source is chosen by EPROM_Select =
//   !T_Ack & read & (InsertIdle | CSW_Sel | IndexLT5 | SN_Byte & !NFirstTime | IdleCh_Sel):
// the EPROM holds the headers, the CSWs, the first SN of each channel and the
// idle cell. The last term (IdleCh_Sel) is this design's addition so that the
// idle cell always comes from the EPROM. All outputs are decoded from the
// state and are stable for the whole C1 period; capture enables (dataout_ce,
// csw_ce) act at the C1 edge ending the period.
module tx_fsm
  import atm_pkg::*;
(
  input  logic       clka,
  input  logic       rst,
  input  logic [2:0] bit_cnt,
  input  logic       fmb_sync,
  input  logic       dead_ts,
  input  logic       idx_eq0,
  input  logic       sn_byte,
  input  logic       idx_lt5,
  input  logic       insert_idle,
  input  logic       idle_ch_sel,
  input  logic       nfirst_time,
  input  logic       t_req,
  input  logic       proc_we,
  output logic       index_ld,
  output logic       fsm_started,
  output logic       t_ack,
  output src_sel_e   mux_sel,
  output logic       nsramcs,
  output logic       nsramrw,
  output logic       neprom_cs,
  output logic       eprom_sel,
  output logic       dataout_ce,
  output logic       csw_ce,
  output logic       csw_sel
);
  typedef enum logic [2:0] {
    ST_INIT = 3'd0,
    ST_LOAD = 3'd1,
    ST_UL1  = 3'd2,
    ST_UL2  = 3'd3,
    ST_PROC = 3'd4
  } tx_state_e;

  tx_state_e state;
  logic      seen_fmb;
  logic      mem_cs, mem_read, c1_en, bit_eq7;

  assign c1_en   = bit_cnt[0];          // last CLKA cycle of a C1 period
  assign bit_eq7 = (bit_cnt == 3'd7);   // last CLKA cycle of a time slot

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      state       <= ST_INIT;
      seen_fmb    <= 1'b0;
      fsm_started <= 1'b0;
    end else begin
      if (fmb_sync) seen_fmb <= 1'b1;
      unique case (state)
        ST_INIT: if (seen_fmb && bit_eq7) begin
                   state       <= ST_LOAD;
                   fsm_started <= 1'b1;
                 end
        ST_LOAD: if (c1_en) state <= ST_UL1;
        ST_UL1:  if (c1_en) state <= ST_UL2;
        ST_UL2:  if (c1_en) state <= ST_PROC;
        ST_PROC: if (c1_en) state <= ST_LOAD;
        default: state <= ST_INIT;
      endcase
    end
  end

  always_comb begin
    index_ld   = 1'b0;
    t_ack      = 1'b0;
    mux_sel    = SRC_NONE;
    mem_cs     = 1'b0;
    mem_read   = 1'b1;
    dataout_ce = 1'b0;
    csw_ce     = 1'b0;
    csw_sel    = 1'b0;
    unique case (state)
      ST_INIT: index_ld = 1'b1;
      ST_LOAD: begin                        // write byte to SRAM
        mux_sel  = SRC_LOAD;
        mem_cs   = 1'b1;
        mem_read = 1'b0;
      end
      ST_UL1: if (!dead_ts) begin
        mux_sel = SRC_UNLOAD;
        mem_cs  = 1'b1;
        if (idx_eq0) begin                  // get CSW byte
          csw_sel = 1'b1;
          csw_ce  = 1'b1;
        end else begin                      // read data or SN
          dataout_ce = 1'b1;
        end
      end
      ST_UL2: if (!dead_ts) begin
        if (idx_eq0) begin                  // read first header byte
          mux_sel    = SRC_UNLOAD;
          mem_cs     = 1'b1;
          dataout_ce = 1'b1;
        end else if (sn_byte && !idle_ch_sel) begin  // write next SN
          mux_sel  = SRC_UNLOAD;
          mem_cs   = 1'b1;
          mem_read = 1'b0;
        end
      end
      ST_PROC: if (t_req) begin             // processor control
        t_ack    = 1'b1;
        mux_sel  = SRC_PROC;
        mem_cs   = 1'b1;
        mem_read = !proc_we;
      end
      default: ;
    endcase
  end

  assign eprom_sel = mem_cs && !t_ack && mem_read &&
                     (insert_idle || csw_sel || idx_lt5 || (sn_byte && !nfirst_time) || idle_ch_sel);
  assign nsramcs   = !(mem_cs && !eprom_sel);
  assign nsramrw   = mem_read;
  assign neprom_cs = !eprom_sel;

  // A memory cycle never writes the EPROM
  assert property (@(posedge clka) !(eprom_sel && !mem_read));
  // The processor only gets the free cycle
  assert property (@(posedge clka) t_ack |-> state == ST_PROC);
endmodule
