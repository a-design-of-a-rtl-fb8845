// sync_sram: single-port SRAM, 2^AW words of DW bits.
//
// Stands for the board's static RAM chips (8k x 9 on the transmitter, 32k x 9
// on the receiver; bit 8 is the parity bit). Active-low chip select ncs and
// read/write nrw (1 = read, 0 = write), as on the chips. The model is
// synchronous: at a CLKA rising edge with ncs low it writes wdata, or
// registers the addressed word into rdata, which is therefore valid one CLKA
// after the address. The control FSMs are timed for this one-cycle latency.
//
// The board uses asynchronous SRAM chips; a synchronous-read array with one
// clock of latency is this design's model of them, and the controllers are
// timed for it.
module sync_sram #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 9
) (
  input  logic          clk,
  input  logic          ncs,
  input  logic          nrw,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (!ncs) begin
      if (!nrw) mem[addr] <= wdata;
      else      rdata     <= mem[addr];
    end
  end
endmodule
