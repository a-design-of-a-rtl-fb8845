// s2p_parity: serial-to-parallel converter and serial parity generator.
//
// Bits arrive MSB first, one per CLKA. An XOR-feedback register accumulates
// the parity of bits 0..6 of the slot and is cleared at the byte boundary
// (bit 7), as in the document's serial parity generator. At the boundary the
// complete byte {sr[6:0], sin} and its parity bit are available
// combinationally (byte_now, par_now) for the 9-bit DataIn register of the
// user, which loads {par_now, byte_now} at the boundary. The parity bit is
// the inverted XOR of the data (see atm_pkg::par_bit).
module s2p_parity (
  input  logic       clka,
  input  logic       rst,
  input  logic       sin,
  input  logic       bit_eq7,
  output logic [7:0] byte_now,
  output logic       par_now
);
  logic [6:0] sr;
  logic       acc;

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      sr  <= '0;
      acc <= 1'b0;
    end else begin
      sr  <= {sr[5:0], sin};
      acc <= bit_eq7 ? 1'b0 : (acc ^ sin);
    end
  end

  assign byte_now = {sr, sin};
  assign par_now  = ~(acc ^ sin);
endmodule
