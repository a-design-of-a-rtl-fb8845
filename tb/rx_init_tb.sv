// rx_init_tb: load-status writes of other channels, and of channel 31 with
// HP below Buffer_Delta, must not start unloading; channel 31 at
// Buffer_Delta sets DeltaReached, StartToUnload follows at the next frame
// end and the unload NFirstTime one frame later; load NFirstTime is set by
// the first channel-31 write.
`timescale 1ns/1ps
module rx_init_tb;
  int checks = 0, failures = 0;
  logic clka = 0, rst = 0, bit_eq7 = 0, slot_eq31 = 0, load_status_we = 0, ch_eq31 = 0;
  logic [3:0] hp_new = 0, buffer_delta = 4'd3;
  logic delta_reached, start_to_unload, rul_nfirst, rl_nfirst;
  rx_init dut (.*);
  always #5 clka = ~clka;
  task automatic chk(bit ok, string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  task automatic ld(bit c31, int hp);
    @(negedge clka); load_status_we = 1; ch_eq31 = c31; hp_new = 4'(hp);
    @(negedge clka); load_status_we = 0; ch_eq31 = 0;
  endtask
  task automatic frame_end();
    @(negedge clka); bit_eq7 = 1; slot_eq31 = 1;
    @(negedge clka); bit_eq7 = 0; slot_eq31 = 0;
  endtask
  initial begin #1000000; $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1); $finish; end
  initial begin
    #2 rst = 1; #5 rst = 0;
    chk(!delta_reached && !start_to_unload && !rul_nfirst && !rl_nfirst, "reset");
    ld(0, 3); frame_end();
    chk(!delta_reached && !rl_nfirst, "other channel");
    ld(1, 1);
    chk(rl_nfirst && !delta_reached, "first ch31 cell");
    ld(1, 2); frame_end();
    chk(!delta_reached && !start_to_unload, "below delta");
    ld(1, 3);
    chk(delta_reached && !start_to_unload, "delta reached");
    frame_end();
    chk(start_to_unload && !rul_nfirst, "start");
    frame_end();
    chk(rul_nfirst, "unload first time done");
    ld(1, 7); frame_end();
    chk(delta_reached && start_to_unload && rul_nfirst && rl_nfirst, "sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
