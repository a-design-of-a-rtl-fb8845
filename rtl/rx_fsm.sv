// rx_fsm: receiver memory sequencer.
//
// The receiver SRAM is shared by the load side (cells from the T1 line),
// the unload side (bytes to the PBX highway) and the processor. Each time
// slot is split into eight one-CLKA phases, chosen by the bit counter:
//   0 UL GetUnload   read unload status (62) of channel slot+1
//   1 UL GetLoad     read load status (63) of that channel
//   2 UL GetIndex    read index status (61) of that channel
//   3 LD             SN slot: read the cell channel's unload status (TP);
//                    payload slot: write the payload byte (not on overrun)
//   4 LD / PROC      SN slot: read the cell channel's load status (HP);
//                    last payload slot: write the load status;
//                    otherwise free for the processor (r_req -> r_ack)
//   5 UL GetData     read the byte to send
//   6 UL WriteIndex  write the next index
//   7 UL WriteUnload write the unload status
// Unload phases run only after StartToUnload. Status reads come from the
// EPROM while the side concerned has not set its NFirstTime flag. The SRAM
// and EPROM registers read data at the end of a phase, so the capture
// enables (outputs ending in _ce) are the decoded read of the previous
// phase, delayed by one CLKA; they are valid in the phase after the read.
// This phase plan is this design's own: the document gives the operations
// and their order in the slot but not a cycle-exact plan for the receiver.
module rx_fsm
  import atm_pkg::*;
(
  input  logic       clka,
  input  logic       rst,
  input  logic [2:0] bit_cnt,
  input  logic       start_to_unload,
  input  logic       rul_nfirst,
  input  logic       rl_nfirst,
  input  logic       sn_flag,
  input  logic       wr_flag,
  input  logic       last_flag,
  input  logic       overrun,
  input  logic       r_req,
  input  logic       proc_we,
  output src_sel_e   addr_sel,
  output src_sel_e   din_sel,
  output idx_sel_e   idx_sel,
  output logic       nsram_cs,
  output logic       nsram_rw,
  output logic       neprom_cs,
  output logic       eprom_sel,
  output logic       r_ack,
  output logic       load_status_we,
  output logic       ul_tp_ce,
  output logic       ul_hp_ce,
  output logic       ul_idx_ce,
  output logic       rl_tp_ce,
  output logic       rl_hp_ce,
  output logic       data_out_ce,
  output logic       proc_rd_ce
);
  logic mem_cs, mem_read, st_read;
  logic rd_ul_tp, rd_ul_hp, rd_ul_idx, rd_rl_tp, rd_rl_hp, rd_data, rd_proc;

  always_comb begin
    addr_sel  = SRC_NONE;
    din_sel   = SRC_NONE;
    idx_sel   = IXS_INDEX;
    mem_cs    = 1'b0;
    mem_read  = 1'b1;
    st_read   = 1'b0;
    r_ack     = 1'b0;
    load_status_we = 1'b0;
    {rd_ul_tp, rd_ul_hp, rd_ul_idx, rd_rl_tp, rd_rl_hp, rd_data, rd_proc} = '0;
    unique case (bit_cnt)
      3'd0: if (start_to_unload) begin
        addr_sel = SRC_UNLOAD; idx_sel = IXS_UNLOAD; mem_cs = 1'b1;
        st_read  = !rul_nfirst; rd_ul_tp = 1'b1;
      end
      3'd1: if (start_to_unload) begin
        addr_sel = SRC_UNLOAD; idx_sel = IXS_LOAD; mem_cs = 1'b1;
        st_read  = !rul_nfirst; rd_ul_hp = 1'b1;
      end
      3'd2: if (start_to_unload) begin
        addr_sel = SRC_UNLOAD; idx_sel = IXS_INDEX; mem_cs = 1'b1;
        st_read  = !rul_nfirst; rd_ul_idx = 1'b1;
      end
      3'd3: if (sn_flag) begin
        addr_sel = SRC_LOAD; idx_sel = IXS_UNLOAD; mem_cs = 1'b1;
        st_read  = !rl_nfirst; rd_rl_tp = 1'b1;
      end else if (wr_flag && !overrun) begin
        addr_sel = SRC_LOAD; idx_sel = IXS_INDEX; din_sel = SRC_UNLOAD;
        mem_cs   = 1'b1; mem_read = 1'b0;
      end
      3'd4: if (sn_flag) begin
        addr_sel = SRC_LOAD; idx_sel = IXS_LOAD; mem_cs = 1'b1;
        st_read  = !rl_nfirst; rd_rl_hp = 1'b1;
      end else if (last_flag) begin
        addr_sel = SRC_LOAD; idx_sel = IXS_LOAD; din_sel = SRC_LOAD;
        mem_cs   = 1'b1; mem_read = 1'b0; load_status_we = 1'b1;
      end else if (r_req) begin
        addr_sel = SRC_PROC; din_sel = SRC_PROC; mem_cs = 1'b1;
        mem_read = !proc_we; r_ack = 1'b1; rd_proc = !proc_we;
      end
      3'd5: if (start_to_unload) begin
        addr_sel = SRC_UNLOAD; idx_sel = IXS_DATA; mem_cs = 1'b1;
        rd_data  = 1'b1;
      end
      3'd6: if (start_to_unload) begin
        addr_sel = SRC_UNLOAD; idx_sel = IXS_INDEX; din_sel = SRC_LOAD;
        mem_cs   = 1'b1; mem_read = 1'b0;
      end
      3'd7: if (start_to_unload) begin
        addr_sel = SRC_UNLOAD; idx_sel = IXS_UNLOAD; din_sel = SRC_LOAD;
        mem_cs   = 1'b1; mem_read = 1'b0;
      end
      default: ;
    endcase
  end

  assign eprom_sel = mem_cs && mem_read && st_read;
  assign nsram_cs  = !(mem_cs && !eprom_sel);
  assign nsram_rw  = mem_read;
  assign neprom_cs = !eprom_sel;

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      {ul_tp_ce, ul_hp_ce, ul_idx_ce, rl_tp_ce, rl_hp_ce, data_out_ce, proc_rd_ce} <= '0;
    end else begin
      {ul_tp_ce, ul_hp_ce, ul_idx_ce, rl_tp_ce, rl_hp_ce, data_out_ce, proc_rd_ce} <=
        {rd_ul_tp, rd_ul_hp, rd_ul_idx, rd_rl_tp, rd_rl_hp, rd_data, rd_proc};
    end
  end

  // The EPROM is never written
  assert property (@(posedge clka) !(eprom_sel && !mem_read));
endmodule
