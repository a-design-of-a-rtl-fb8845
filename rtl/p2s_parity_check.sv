// p2s_parity_check: parallel-to-serial converter with all-ones forcing and a
// serial parity check.
//
// At the byte boundary (load) the 9-bit word din = {parity, byte} is taken;
// during the next eight CLKA cycles its byte is shifted out MSB first. When
// force_ones was high at the load the slot is sent as all ones (the OR gate
// in front of the serial output that inserts dead or inactive slots). The
// bits actually shifted are XOR-accumulated; at the next boundary the
// accumulated value is compared with the stored parity bit and parity_err is
// set for one slot if they disagree and chk_en was high at the load (it is
// low for EPROM data, which has no parity bit, and for forced slots).
//
// Follows the original block (shift register, force-to-one OR, serial
// parity check); holding the error flag for one slot is this design's
// choice.
module p2s_parity_check (
  input  logic       clka,
  input  logic       rst,
  input  logic       load,
  input  logic [8:0] din,
  input  logic       force_ones,
  input  logic       chk_en,
  output logic       sout,
  output logic       parity_err
);
  logic [7:0] sr;
  logic       par_q, force_q, chk_q, acc;

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      sr         <= '1;
      par_q      <= 1'b0;
      force_q    <= 1'b1;
      chk_q      <= 1'b0;
      acc        <= 1'b0;
      parity_err <= 1'b0;
    end else if (load) begin
      parity_err <= chk_q && ((acc ^ sr[7]) == par_q);
      sr         <= din[7:0];
      par_q      <= din[8];
      force_q    <= force_ones;
      chk_q      <= chk_en && !force_ones;
      acc        <= 1'b0;
    end else begin
      acc <= acc ^ sr[7];
      sr  <= {sr[6:0], 1'b0};
    end
  end

  assign sout = sr[7] | force_q;
endmodule
