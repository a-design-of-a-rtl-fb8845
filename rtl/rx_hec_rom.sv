// rx_hec_rom: HEC look-up EPROM of the receiver.
//
// Addressed by the 6-bit channel number taken from the received header
// (bit 5 = VCI bit 5, bits 4:0 = PCM time slot); returns the HEC byte that a
// correct header for that channel carries. Address 0 is the idle cell
// (header 00 00 00 01, HEC 0x52). Addresses 1..31 are not headers used on
// this board and read 0x00 (never a valid idle/user combination because
// rx_cell_delin only accepts channel 0 or channels with bit 5 set).
// The content is computed with atm_pkg::header_hec; read data is registered on
// CLKA (one-cycle latency), which is well inside the byte time available.
//
// Follows the original table (idle 0x52, user cells the CRC-8 of the VCI,
// with its three listed exceptions);
// the extra address bit 5, which keeps idle and user entries apart, is this
// design's choice.
module rx_hec_rom
  import atm_pkg::*;
(
  input  logic       clk,
  input  logic [5:0] addr,
  output logic [7:0] rdata
);
  function automatic logic [7:0] content(input logic [5:0] a);
    if (a == 6'd0)  return hec8(IDLE_HEADER);
    if (a[5])       return header_hec(user_header(a[4:0]));
    return 8'h00;
  endfunction

  always_ff @(posedge clk) rdata <= content(addr);
endmodule
