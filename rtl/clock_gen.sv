// clock_gen: bench-test CLKA and FMB generator.
//
// Divides the 4.096 MHz C4M by two for CLKA and counts 1024 C4M cycles
// (two 32-slot frames) between FMB pulses, as in the document. FMB is
// registered and high for C4M counts 1022 and 1023, one full CLKA period
// containing exactly one CLKA rising edge; both outputs change only when
// CLKA falls, so the CLKA logic samples FMB cleanly. (The document uses
// the counter's one-C4M-cycle CEO directly; the wider, registered pulse is
// this design's choice.) CLKA equals bit 0 of the counter.
module clock_gen (
  input  logic c4m,
  input  logic rst,
  output logic clka,
  output logic fmb
);
  logic [9:0] cnt;

  always_ff @(posedge c4m or posedge rst) begin
    if (rst) begin
      cnt  <= '0;
      clka <= 1'b0;
      fmb  <= 1'b0;
    end else begin
      cnt  <= cnt + 10'd1;
      clka <= ~cnt[0];
      fmb  <= (cnt + 10'd1) >= 10'd1022;
    end
  end
endmodule
