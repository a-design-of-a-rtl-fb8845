// rx_header_recog: receiver header recognition (hunt for the first header
// bytes of a cell).
//
// Every active received byte (byte_ce high at the end of a live T1 byte) is
// tested for zeros: zA covers the bits that must be zero in every header
// byte of a cell for this board (GFC/VPI bits, upper VCI bits), zB the bits
// that must also be zero in the first two bytes. Two registers remember
// whether the last two bytes were all zero (R1, R2). Header is asserted
// while the current byte completes a 00 00 0000_00xx sequence, that is on
// the third header byte; the channel number is then taken from the third
// and fourth bytes by rx_cell_delin. While the previous byte was recognised
// (header_q) only bits 3:2 of the next byte (the PT bits of the fourth
// header byte) are tested, following the two-level zero test of the
// document's header signal circuit.
// Timing: sp is the byte being completed (valid in the bit-7 cycle);
// header is combinational, the registers update when byte_ce is high.
module rx_header_recog (
  input  logic       clka,
  input  logic       rst,
  input  logic       byte_ce,
  input  logic [7:0] sp,
  output logic       header
);
  logic za, zb, r1, r2, header_q;

  assign za     = header_q ? (sp[3:2] == 2'b00) : (sp[7:2] == 6'd0);
  assign zb     = header_q ? 1'b1 : (sp[1:0] == 2'b00);
  assign header = za && r1 && r2;

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      r1       <= 1'b0;
      r2       <= 1'b0;
      header_q <= 1'b0;
    end else if (byte_ce) begin
      r1       <= za && zb;
      r2       <= r1;
      header_q <= header;
    end
  end
endmodule
