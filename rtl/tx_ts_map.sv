// tx_ts_map: time slot to transmitter SRAM channel mapping.
//
// Combinational. The DataIn register delays the data by one slot, so while
// the slot counter reads ts the byte being written belongs to slot ts-1; the
// table below already includes that minus one. The 21 carried slots land in
// channels 0..20, the dead and masked slots in 21..30 (slots 24 and 28 share
// channel 30), channel 31 is kept for the idle cell. eq20 flags channel 20,
// the last carried channel of a T1 frame.
//
// The slot-to-channel table follows the original mapping table; it is
// written as a case table rather than the printed sum-of-products.
module tx_ts_map (
  input  logic [4:0] ts,
  output logic [4:0] ch,
  output logic       eq20
);
  always_comb begin
    unique case (ts)
      5'd0:  ch = 5'd20;  5'd1:  ch = 5'd21;  5'd2:  ch = 5'd22;  5'd3:  ch = 5'd23;
      5'd4:  ch = 5'd24;  5'd5:  ch = 5'd25;  5'd6:  ch = 5'd0;   5'd7:  ch = 5'd1;
      5'd8:  ch = 5'd2;   5'd9:  ch = 5'd26;  5'd10: ch = 5'd3;   5'd11: ch = 5'd4;
      5'd12: ch = 5'd5;   5'd13: ch = 5'd27;  5'd14: ch = 5'd6;   5'd15: ch = 5'd7;
      5'd16: ch = 5'd8;   5'd17: ch = 5'd28;  5'd18: ch = 5'd9;   5'd19: ch = 5'd10;
      5'd20: ch = 5'd11;  5'd21: ch = 5'd29;  5'd22: ch = 5'd12;  5'd23: ch = 5'd13;
      5'd24: ch = 5'd14;  5'd25: ch = 5'd30;  5'd26: ch = 5'd15;  5'd27: ch = 5'd16;
      5'd28: ch = 5'd17;  5'd29: ch = 5'd30;  5'd30: ch = 5'd18;  default: ch = 5'd19;
    endcase
  end
  assign eq20 = (ch == 5'd20);
endmodule
