// pattern_gen: bench-test pattern for the transmitter input.
//
// Sends one byte per time slot, MSB first, from the eleven-value sequence
// 69 97 65 A6 5D 96 99 76 5A 65 D9. A mod-11 value counter steps at every
// byte boundary and is cleared by FMB, which comes every 64 slots; so slot
// t of the first frame after FMB gets value t mod 11 (the document's First
// value) and slot t of the second frame value (t+10) mod 11 (its Second
// value), which is the alternation of the document's time slot table.
// FMB sampled high at a CLKA edge starts slot 0, bit 0 on the next cycle.
module pattern_gen (
  input  logic clka,
  input  logic rst,
  input  logic fmb,
  output logic sout
);
  logic [2:0] bit_cnt;
  logic [3:0] vcnt;
  logic [7:0] value;

  always_comb begin
    unique case (vcnt)
      4'd0:    value = 8'h69;
      4'd1:    value = 8'h97;
      4'd2:    value = 8'h65;
      4'd3:    value = 8'hA6;
      4'd4:    value = 8'h5D;
      4'd5:    value = 8'h96;
      4'd6:    value = 8'h99;
      4'd7:    value = 8'h76;
      4'd8:    value = 8'h5A;
      4'd9:    value = 8'h65;
      default: value = 8'hD9;
    endcase
  end

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      bit_cnt <= '0;
      vcnt    <= '0;
    end else if (fmb) begin
      bit_cnt <= '0;
      vcnt    <= '0;
    end else begin
      bit_cnt <= bit_cnt + 3'd1;
      if (bit_cnt == 3'd7) vcnt <= (vcnt >= 4'd10) ? 4'd0 : vcnt + 4'd1;
    end
  end

  assign sout = value[3'd7 - bit_cnt];
endmodule
