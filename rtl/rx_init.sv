// rx_init: receiver start-up sequencing.
//
// DeltaReached is set when the load status of the last channel in the
// cell rotation (time slot 31) is written with HP equal to Buffer_Delta,
// i.e. every channel holds Buffer_Delta loaded buffers. StartToUnload is
// then set at the end of the next frame (slot 31 byte boundary), and the
// unload side's NFirstTime one frame later, after the unload side has
// written the Init, Index and Unload status of every channel once. The
// load side's NFirstTime is set when the first channel-31 cell has written
// its load status: from then on all load status words are in the SRAM.
// All flags are sticky until reset.
//
// Follows the original: StartToUnload is set at the end of slot 31 once
// Buffer_Delta is reached and then stays set until reset. Using channel 31
// for the comparison is this design's choice.
module rx_init (
  input  logic       clka,
  input  logic       rst,
  input  logic       bit_eq7,
  input  logic       slot_eq31,
  input  logic       load_status_we,
  input  logic       ch_eq31,
  input  logic [3:0] hp_new,
  input  logic [3:0] buffer_delta,
  output logic       delta_reached,
  output logic       start_to_unload,
  output logic       rul_nfirst,
  output logic       rl_nfirst
);
  logic frame_end;
  assign frame_end = bit_eq7 && slot_eq31;

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      delta_reached   <= 1'b0;
      start_to_unload <= 1'b0;
      rul_nfirst      <= 1'b0;
      rl_nfirst       <= 1'b0;
    end else begin
      if (load_status_we && ch_eq31) begin
        rl_nfirst <= 1'b1;
        if (hp_new == buffer_delta) delta_reached <= 1'b1;
      end
      if (frame_end && delta_reached)   start_to_unload <= 1'b1;
      if (frame_end && start_to_unload) rul_nfirst      <= 1'b1;
    end
  end
endmodule
