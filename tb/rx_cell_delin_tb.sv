// rx_cell_delin_tb: feeds the delineation block (with the header
// recogniser and HEC ROM) a byte stream of user cells, idle cells, cells
// with a wrong HEC and random filler. Every good user cell must give one
// SN flag, 47 write flags with indexes 0..46 and one last flag, for the
// right channel; idle cells only an idle-done pulse; bad cells nothing.
`timescale 1ns/1ps
module rx_cell_delin_tb;
  import atm_pkg::*;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, bit_eq7 = 0, byte_ce = 0;
  logic [7:0] sp = 0, prev = 0, hec_data;
  logic header;
  logic [5:0] chnum, wr_idx;
  logic correct_hec, hec_fail, ch_eq31, sn_flag, wr_flag, last_flag, idle_done;
  rx_header_recog u_h (.clka, .rst, .byte_ce, .sp, .header);
  rx_hec_rom u_rom (.clk(clka), .addr(chnum), .rdata(hec_data));
  rx_cell_delin dut (.clka, .rst, .bit_eq7, .byte_ce, .header, .sp, .prev_byte(prev[1:0]),
    .hec_data, .chnum, .correct_hec, .hec_fail, .ch_eq31, .sn_flag, .wr_flag,
    .last_flag, .idle_done, .wr_idx);
  always #5 clka = ~clka;

  int exp_ts [$];
  int good = 0, idle = 0, bad = 0, n_sn = 0, n_last = 0, n_idle = 0, n_fail = 0, widx = 0;
  int cur_ts = -1;
  logic [7:0] last_b = 0;

  task automatic send(logic [7:0] b);
    for (int k = 0; k < 8; k++) begin
      @(negedge clka);
      bit_eq7 = (k == 7);
      byte_ce = (k == 7);
      sp = b;
      if (k == 0) prev = last_b;
      if (k == 0) begin
        // flags refer to the previous byte
        if (sn_flag) begin
          n_sn++; widx = 0;
          cur_ts = exp_ts.pop_front();
          checks++; if (chnum != {1'b1, 5'(cur_ts)}) begin failures++; $display("FAIL chnum %h ts %0d", chnum, cur_ts); end
        end
        if (wr_flag) begin
          checks++; if (wr_idx != 6'(widx)) begin failures++; $display("FAIL idx %0d exp %0d", wr_idx, widx); end
          widx++;
        end
        if (last_flag) begin n_last++; checks++; if (widx != 47) failures++; end
        if (idle_done) n_idle++;
      end
      if (k == 7) begin #1; if (hec_fail) n_fail++; end
    end
    last_b = b;
  endtask

  task automatic send_cell(int kind, int ts);   // 0 user, 1 idle, 2 bad HEC
    logic [31:0] h;
    h = (kind == 1) ? IDLE_HEADER : user_header(5'(ts));
    send(h[31:24]); send(h[23:16]); send(h[15:8]); send(h[7:0]);
    send(header_hec(h) ^ ((kind == 2) ? 8'h10 : 8'h00));
    send(8'h16);
    for (int i = 0; i < 47; i++) send(8'($urandom) | 8'h80);
  endtask

  initial begin #100ms; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #5 rst = 0;
    for (int i = 0; i < 7; i++) send(8'($urandom));
    for (int n = 0; n < 300; n++) begin
      int kind, ts;
      kind = ($urandom % 6 == 0) ? 1 : ($urandom % 6 == 0) ? 2 : 0;
      ts = 5 + ($urandom % 27);
      if (kind == 0) begin exp_ts.push_back(ts); good++; end
      else if (kind == 1) idle++;
      else bad++;
      send_cell(kind, ts);
    end
    send(8'hFF); send(8'hFF);
    checks++; if (n_sn != good || n_last != good) begin failures++; $display("FAIL sn %0d last %0d good %0d", n_sn, n_last, good); end
    checks++; if (n_idle != idle) begin failures++; $display("FAIL idle %0d exp %0d", n_idle, idle); end
    checks++; if (n_fail < bad) begin failures++; $display("FAIL hec_fail %0d bad %0d", n_fail, bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
