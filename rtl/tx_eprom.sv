// tx_eprom: transmitter initialisation and status EPROM, 8k x 8.
//
// Only status buffer 3 is programmed (address {channel, 2'b11, index}):
//   channels 0..20, index 0..4: the 5-byte ATM header of the channel, with
//     GFC = VPI = 0, VCI = 32 + carried PCM time slot, PT = 0, CLP = 0 and
//     the HEC of the original table (atm_pkg::header_hec);
//   channels 0..20, index 5: the first SN byte, 0x01 (SN 0, CRC 0, odd parity);
//   channels 0..20, index 63: the channel status word, bit 7 = active;
//   channel 31, index 0..52: the idle cell, header 00 00 00 01 52 and
//     payload bytes 6A; index 63: 0x80.
// Every other location reads 0xFF. The content is computed from the address
// by the functions of atm_pkg rather than loaded from a file. Read data is
// registered on CLKA while ncs is low, like sync_sram.
//
// Follows the original memory map and the values of the original table
// (headers and their HECs, first SN 0x01, CSW 0x80, idle cell); generating
// them from the address instead of storing a table is this design's choice.
module tx_eprom
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        ncs,
  input  logic [12:0] addr,
  output logic [7:0]  rdata
);
  function automatic logic [7:0] content(input logic [12:0] a);
    logic [4:0]  ch;
    logic [1:0]  bf;
    logic [5:0]  ix;
    logic [31:0] h;
    ch = a[12:8];
    bf = a[7:6];
    ix = a[5:0];
    content = 8'hFF;
    if (bf == TX_STATUS_BUF) begin
      if (ch < 5'(ACTIVE_CH)) begin
        h = user_header(ch_to_ts(ch));
        case (ix)
          6'd0: content = h[31:24];
          6'd1: content = h[23:16];
          6'd2: content = h[15:8];
          6'd3: content = h[7:0];
          6'd4: content = header_hec(h);
          6'd5: content = 8'h01;
          6'd63: content = 8'h80;
          default: content = 8'hFF;
        endcase
      end else if (ch == TX_IDLE_CH) begin
        case (ix)
          6'd0: content = IDLE_HEADER[31:24];
          6'd1: content = IDLE_HEADER[23:16];
          6'd2: content = IDLE_HEADER[15:8];
          6'd3: content = IDLE_HEADER[7:0];
          6'd4: content = hec8(IDLE_HEADER);
          6'd63:   content = 8'h80;
          default: content = (ix <= 6'd52) ? IDLE_PAYLOAD : 8'hFF;
        endcase
      end
    end
  endfunction

  always_ff @(posedge clk)
    if (!ncs) rdata <= content(addr);
endmodule
