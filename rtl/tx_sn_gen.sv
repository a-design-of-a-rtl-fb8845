// tx_sn_gen: next AAL1 sequence-number byte.
//
// Combinational; only the upper nibble of the current byte is needed.
// The SN byte is {CSI, SN[2:0], CRC[2:0], P}. From the CSI and
// SN bits of the byte just read, the next byte keeps CSI, counts SN up modulo
// 8 and carries the CRC-3 (x^3+x+1) of {CSI,SN} and a parity bit, exactly as
// listed in the document's 16-row truth table, which is reproduced here as a
// lookup. sn_out[8] is the memory parity bit of the new word (XNOR of the
// eight data bits, the board-wide convention; this bit is this design's own).
module tx_sn_gen
  import atm_pkg::*;
(
  input  logic [3:0] sn_in,      // {CSI, SN[2:0]} of the current SN byte
  output logic [8:0] sn_out
);
  logic [7:0] nxt;
  always_comb begin
    unique case (sn_in)
      4'b0000: nxt = 8'h16;
      4'b0001: nxt = 8'h2C;
      4'b0010: nxt = 8'h3B;
      4'b0011: nxt = 8'h4F;
      4'b0100: nxt = 8'h58;
      4'b0101: nxt = 8'h62;
      4'b0110: nxt = 8'h75;
      4'b0111: nxt = 8'h00;
      4'b1000: nxt = 8'h9D;
      4'b1001: nxt = 8'hA7;
      4'b1010: nxt = 8'hB0;
      4'b1011: nxt = 8'hC4;
      4'b1100: nxt = 8'hD3;
      4'b1101: nxt = 8'hE9;
      4'b1110: nxt = 8'hFE;
      default: nxt = 8'h8A;
    endcase
  end
  assign sn_out = {par_bit(nxt), nxt};
endmodule
