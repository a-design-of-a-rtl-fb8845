// atm_pkg: constants and helper functions shared by the PBX-to-ATM board.
//
// Memory word formats, address-field widths, the parity convention used on
// every 9-bit memory word, and the ATM header error control (HEC) functions.
// crc8 is the CRC-8 with generator x^8+x^2+x+1 over a 32-bit word; hec8 adds
// the ITU I.432 coset 0x55. header_hec gives the HEC byte this board sends
// and expects: the I.432 value 0x52 for the idle cell, and for user cells
// the CRC-8 of the VCI taken as a right-aligned 32-bit number, without the
// coset. That is the value set of the original board's EPROM tables (for
// example 0xFB for time slot 5), including their three entries that differ
// from the rule (time slots 14, 15 and 31); a standard I.432 receiver would not
// accept these user-cell HECs. Parity: bit 8 of a memory word is the XNOR of
// the eight data bits (the serial generator's register is inverted on its way
// out), so a good 9-bit word always holds an odd number of ones.
//
// Follows the original design: 21 carried channels, 47-byte payloads, the
// memory maps, the HEC values and the odd-parity convention. The header is
// VPI 0, VCI 32 + time slot. Not every constant is used by every module
// that imports the package, so linting the package alone reports unused
// parameters; that is expected.
package atm_pkg;

  // Highway geometry
  localparam int unsigned ACTIVE_CH       = 21;  // channels carried in ATM cells
  localparam int unsigned PAYLOAD_BYTES   = 47;  // after the AAL1 SN byte

  // Transmitter memory: {channel[12:8], buffer[7:6], index[5:0]}
  localparam int unsigned TX_AW = 13;
  // Receiver memory: {channel[14:10], buffer[9:6], index[5:0]}
  localparam int unsigned RX_AW = 15;

  // Transmitter status buffer locations
  localparam logic [1:0] TX_STATUS_BUF = 2'd3;
  localparam logic [5:0] TX_SN_IDX     = 6'd5;
  localparam logic [5:0] TX_CSW_IDX    = 6'd63;
  localparam logic [4:0] TX_IDLE_CH    = 5'd31;

  // Receiver status buffer locations
  localparam logic [3:0] RX_STATUS_BUF  = 4'd15;
  localparam logic [5:0] RX_INDEX_LOC   = 6'd61;
  localparam logic [5:0] RX_UNLOAD_LOC  = 6'd62;
  localparam logic [5:0] RX_LOAD_LOC    = 6'd63;

  // R_IndexSel encoding {S1,S0}
  typedef enum logic [1:0] {
    IXS_INDEX  = 2'b00,   // Index status location / load payload index
    IXS_UNLOAD = 2'b01,   // Unload status location
    IXS_LOAD   = 2'b10,   // Load status location
    IXS_DATA   = 2'b11    // unload payload index
  } idx_sel_e;

  // Address / data source select {S1,S0}
  typedef enum logic [1:0] {
    SRC_PROC   = 2'b00,
    SRC_LOAD   = 2'b01,   // Tx: load address / DataIn reg; Rx: load address / status mux
    SRC_UNLOAD = 2'b10,   // Tx: unload address / SN generator; Rx: unload address / DataIn reg
    SRC_NONE   = 2'b11
  } src_sel_e;

  // Memory parity bit of a data byte
  function automatic logic par_bit(input logic [7:0] d);
    return ~(^d);
  endfunction

  // CRC-8, generator x^8+x^2+x+1, zero start, MSB first
  function automatic logic [7:0] crc8(input logic [31:0] hdr);
    logic [7:0] crc;
    crc = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb  = crc[7] ^ hdr[i];
      crc = {crc[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return crc;
  endfunction

  // ITU I.432 HEC over a 32-bit header (byte 1 in bits 31:24)
  function automatic logic [7:0] hec8(input logic [31:0] hdr);
    return crc8(hdr) ^ 8'h55;
  endfunction

  // First four header bytes for a cell addressed to PCM time slot ts:
  // GFC=0, VPI=0, VCI=32+ts, PT=0, CLP=0.
  function automatic logic [31:0] user_header(input logic [4:0] ts);
    logic [15:0] vci;
    vci = 16'd32 + {11'd0, ts};
    return {4'h0, 8'h00, vci, 3'b000, 1'b0};
  endfunction

  localparam logic [31:0] IDLE_HEADER  = 32'h0000_0001;
  localparam logic [7:0]  IDLE_PAYLOAD = 8'h6A;

  // HEC byte of a header as sent and checked on this board (see above)
  function automatic logic [7:0] header_hec(input logic [31:0] hdr);
    if (hdr == IDLE_HEADER) return hec8(hdr);
    // the original tables carry these two values instead of the CRC
    if (hdr[19:4] == 16'd46) return 8'h65;   // time slot 14
    if (hdr[19:4] == 16'd47) return 8'hC5;   // time slot 15
    if (hdr[19:4] == 16'd63) return 8'hB5;   // time slot 31
    return crc8({16'h0000, hdr[19:4]});
  endfunction

  // Logical channel (0..20) to the PCM time slot it carries: the 21 slots
  // left after the dead slots 0,4,...,28 and the masked slots 1,2,3.
  function automatic logic [4:0] ch_to_ts(input logic [4:0] ch);
    return ch + ch / 5'd3 + 5'd5;
  endfunction

  // Time slot is carried in a cell (active on the receiver)
  function automatic logic ts_active(input logic [4:0] ts);
    return (ts[1:0] != 2'b00) && (ts > 5'd4);
  endfunction

endpackage
