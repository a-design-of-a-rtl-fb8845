// rx_eprom: receiver initialisation EPROM, 32k x 8.
//
// Holds the power-up values of the three status locations of every channel
// (address {time slot[14:10], buffer 15, location[5:0]}):
//   61 Index status : 0x00 (unload index 0);
//   62 Unload status: {Active, Init=0, UnderRun=0, 0, TP=0}, Active set for
//                     the 21 carried time slots (0x80, else 0x00);
//   63 Load status  : 0x70 (no overrun, SN 7 so that SN 0 comes next, HP 0).
// Used instead of the SRAM for status reads until the side concerned has
// written its own status words (NFirstTime). All other locations read 0xFF.
// Content is computed from the address; read data registered on CLKA.
//
// The values follow the original board's EPROM table; the positions of
// Init and UnderRun in the unload status word are this design's own.
module rx_eprom
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        ncs,
  input  logic [14:0] addr,
  output logic [7:0]  rdata
);
  function automatic logic [7:0] content(input logic [14:0] a);
    logic [4:0] ts;
    ts = a[14:10];
    if (a[9:6] != RX_STATUS_BUF) return 8'hFF;
    case (a[5:0])
      RX_INDEX_LOC:  return 8'h00;
      RX_UNLOAD_LOC: return {ts_active(ts), 7'd0};
      RX_LOAD_LOC:   return 8'h70;
      default:       return 8'hFF;
    endcase
  endfunction

  always_ff @(posedge clk)
    if (!ncs) rdata <= content(addr);
endmodule
