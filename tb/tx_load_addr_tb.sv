// tx_load_addr_tb: runs the slot timing for 200 frames and checks the load
// address against a reference: channel from the slot map, index 6..52
// stepping after the channel-20 slot, buffer 0,1,2 rotating, and
// StartToUnload from the first buffer wrap on.
`timescale 1ns/1ps
module tx_load_addr_tb;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, bit_eq7 = 0, fsm_started = 0, index_ld = 1;
  logic [4:0] slot = 0;
  logic [12:0] addr;
  logic start_to_unload;
  logic [4:0] mch;
  logic eq20;
  int idx = 6, bufc = 0, wraps = 0;
  tx_load_addr dut (.*);
  tx_ts_map ref_map (.ts(slot), .ch(mch), .eq20(eq20));
  always #5 clka = ~clka;
  initial begin #10000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #5 rst = 0;
    for (int c = 0; c < 200 * 256; c++) begin
      @(negedge clka);
      bit_eq7 = (c % 8 == 7);
      slot = 5'((c / 8) % 32);
      if (c == 300) begin fsm_started = 1; index_ld = 0; end
      #1;
      checks++;
      if (addr != {mch, 2'(bufc), 6'(idx)} || start_to_unload != (wraps > 0)) begin
        failures++;
        if (failures < 10) $display("FAIL c %0d addr %h exp %h", c, addr, {mch, 2'(bufc), 6'(idx)});
      end
      if (bit_eq7 && eq20 && fsm_started) begin
        if (idx == 52) begin idx = 6; bufc = (bufc + 1) % 3; wraps++; end
        else idx++;
      end
    end
    checks++;
    if (wraps < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
