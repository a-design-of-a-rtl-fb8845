// tdm_timing: byte and frame timing for the 2.048 Mb/s PCM highway.
//
// A 3-bit bit counter and a 5-bit time-slot counter are reset by the frame
// marker FMB, which the backplane holds high across the CLKA rising edge that
// ends time slot 31; the following CLKA cycle is bit 0 of slot 0. The byte
// boundary (bit 7) replaces the 256 kHz byte clock C256k and the odd bit
// positions (bit_cnt[0] high) replace the 1.024 MHz FSM clock C1 as clock
// enables, decoded by the users: the whole board runs on CLKA.
// FMB_Sync is FMB registered on CLKA.
//
// Follows the original bit and slot counters reset by FMB; using clock
// enables on the single CLKA clock instead of derived clocks is this
// design's choice.
module tdm_timing #(
  parameter int unsigned SLOTS = 32
) (
  input  logic       clka,
  input  logic       rst,
  input  logic       fmb,
  output logic       fmb_sync,
  output logic [2:0] bit_cnt,
  output logic       bit_eq7,
  output logic [4:0] slot
);
  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      bit_cnt  <= '0;
      slot     <= '0;
      fmb_sync <= 1'b0;
    end else begin
      fmb_sync <= fmb;
      if (fmb) begin
        bit_cnt <= '0;
        slot    <= '0;
      end else begin
        bit_cnt <= bit_cnt + 3'd1;
        if (bit_cnt == 3'd7)
          slot <= (slot == 5'(SLOTS - 1)) ? 5'd0 : slot + 5'd1;
      end
    end
  end

  assign bit_eq7   = (bit_cnt == 3'd7);
endmodule
