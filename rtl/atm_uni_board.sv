// atm_uni_board: the ATM user-network interface board between the PBX
// (TMD24 MTS chip) and the T1 framer (FAU chip).
//
// Transmit: FAU Data In (the MTS output, 32-slot PCM highway) -> atm_tx ->
// Modified FAU Data In (ATM cells in the 24 live T1 byte slots).
// Receive: FAU Data Out (cells from the T1 line) -> atm_rx -> Modified FAU
// Data Out (PCM highway back to the MTS).
// The board holds the transmitter SRAM (8k x 9) and EPROM (8k x 8), the
// receiver SRAM (32k x 9), EPROM (32k x 8) and HEC EPROM, and the test
// logic: clock_gen makes CLKA and FMB from C4M (brought out on test_clka /
// test_fmb, to be looped back to clka / fmb for bench use), and
// pattern_gen replaces the MTS data when test_pattern_en is high.
// Both processor ports are request/acknowledge: hold the request with
// address, data and write-enable until the acknowledge, read data follows
// on the clock after it. All board logic runs on CLKA rising edges; rst is
// the asynchronous active-high board reset.
//
// Follows the original board's block diagram: transmitter and receiver
// FPGAs, their SRAMs and EPROMs, the HEC EPROM and the bench-test clock and
// pattern generators. Own choices: the processor ports and the event
// outputs are brought out as plain pins for monitoring and testing.
module atm_uni_board (
  input  logic        c4m,
  input  logic        rst,
  input  logic        clka,
  input  logic        fmb,
  output logic        test_clka,
  output logic        test_fmb,
  input  logic        test_pattern_en,
  // line side
  input  logic        fau_data_in,        // from the MTS
  output logic        mod_fau_data_in,    // to the FAU (T1 transmit)
  input  logic        fau_data_out,       // from the FAU (T1 receive)
  output logic        mod_fau_data_out,   // to the MTS
  input  logic [3:0]  buffer_delta,
  // transmitter processor port
  input  logic        t_req,
  input  logic        t_we,
  input  logic [12:0] t_addr,
  input  logic [7:0]  t_wdata,
  output logic        t_ack,
  output logic [7:0]  t_rdata,
  // receiver processor port
  input  logic        r_req,
  input  logic        r_we,
  input  logic [14:0] r_addr,
  input  logic [7:0]  r_wdata,
  output logic        r_ack,
  output logic [7:0]  r_rdata,
  // status
  output logic        tx_parity_err,
  output logic        rx_parity_err,
  output logic        tx_insert_idle,
  output logic        tx_dead_ts,
  output logic        tx_cell_end,
  output logic        tx_start_to_unload,
  output logic        tx_nfirst_time,
  output logic        rx_cell_ok,
  output logic        rx_hec_fail,
  output logic        rx_idle_cell,
  output logic        rx_overrun,
  output logic        rx_underrun,
  output logic        rx_delta_reached,
  output logic        rx_start_to_unload
);
  logic        pat_sout, tx_in;
  logic [12:0] tx_sram_addr, tx_eprom_addr;
  logic [8:0]  tx_sram_wdata, tx_sram_rdata;
  logic        tx_sram_ncs, tx_sram_nrw, tx_eprom_ncs;
  logic [7:0]  tx_eprom_rdata;
  logic [14:0] rx_sram_addr, rx_eprom_addr;
  logic [8:0]  rx_sram_wdata, rx_sram_rdata;
  logic        rx_sram_ncs, rx_sram_nrw, rx_eprom_ncs;
  logic [7:0]  rx_eprom_rdata, hec_rdata;
  logic [5:0]  hec_addr;

  clock_gen u_clk (.c4m, .rst, .clka(test_clka), .fmb(test_fmb));

  pattern_gen u_pat (.clka, .rst, .fmb, .sout(pat_sout));

  assign tx_in = test_pattern_en ? pat_sout : fau_data_in;

  atm_tx u_tx (
    .clka, .rst, .fmb, .pbx_sin(tx_in), .t1_sout(mod_fau_data_in),
    .parity_err(tx_parity_err),
    .t_req, .proc_we(t_we), .proc_addr(t_addr), .proc_wdata(t_wdata),
    .t_ack, .proc_rdata(t_rdata),
    .sram_addr(tx_sram_addr), .sram_wdata(tx_sram_wdata), .sram_ncs(tx_sram_ncs),
    .sram_nrw(tx_sram_nrw), .sram_rdata(tx_sram_rdata),
    .eprom_addr(tx_eprom_addr), .eprom_ncs(tx_eprom_ncs), .eprom_rdata(tx_eprom_rdata),
    .insert_idle(tx_insert_idle), .dead_ts(tx_dead_ts), .cell_end(tx_cell_end),
    .start_to_unload(tx_start_to_unload), .nfirst_time(tx_nfirst_time)
  );

  sync_sram #(.AW(atm_pkg::TX_AW), .DW(9)) u_tx_sram (
    .clk(clka), .ncs(tx_sram_ncs), .nrw(tx_sram_nrw), .addr(tx_sram_addr),
    .wdata(tx_sram_wdata), .rdata(tx_sram_rdata)
  );

  tx_eprom u_tx_eprom (
    .clk(clka), .ncs(tx_eprom_ncs), .addr(tx_eprom_addr), .rdata(tx_eprom_rdata)
  );

  atm_rx u_rx (
    .clka, .rst, .fmb, .t1_sin(fau_data_out), .pbx_sout(mod_fau_data_out),
    .parity_err(rx_parity_err), .buffer_delta,
    .r_req, .proc_we(r_we), .proc_addr(r_addr), .proc_wdata(r_wdata),
    .r_ack, .proc_rdata(r_rdata),
    .sram_addr(rx_sram_addr), .sram_wdata(rx_sram_wdata), .sram_ncs(rx_sram_ncs),
    .sram_nrw(rx_sram_nrw), .sram_rdata(rx_sram_rdata),
    .eprom_addr(rx_eprom_addr), .eprom_ncs(rx_eprom_ncs), .eprom_rdata(rx_eprom_rdata),
    .hec_addr, .hec_rdata,
    .ev_cell_ok(rx_cell_ok), .ev_hec_fail(rx_hec_fail), .ev_idle_cell(rx_idle_cell),
    .ev_overrun(rx_overrun), .ev_underrun(rx_underrun),
    .delta_reached(rx_delta_reached), .start_to_unload(rx_start_to_unload)
  );

  sync_sram #(.AW(atm_pkg::RX_AW), .DW(9)) u_rx_sram (
    .clk(clka), .ncs(rx_sram_ncs), .nrw(rx_sram_nrw), .addr(rx_sram_addr),
    .wdata(rx_sram_wdata), .rdata(rx_sram_rdata)
  );

  rx_eprom u_rx_eprom (
    .clk(clka), .ncs(rx_eprom_ncs), .addr(rx_eprom_addr), .rdata(rx_eprom_rdata)
  );

  rx_hec_rom u_hec (.clk(clka), .addr(hec_addr), .rdata(hec_rdata));
endmodule
