// dead_byte_counter: marks the 8 inactive time slots (0,4,...,28) of the
// 32-slot internal highway.
//
// A 2-bit counter advances at every byte boundary and is cleared by FMB, so
// during slot s it holds s mod 4. tc (count 3) means the next slot is dead
// (Dead_TS): the transmitter sends the all-ones byte in it, the receiver
// registers tc at the byte boundary to know that the byte now arriving is
// a dead byte.
//
// Follows the original design (a 2-bit counter reset by FMB, terminal count
// = Dead_TS); the registered form is unchanged.
module dead_byte_counter (
  input  logic       clka,
  input  logic       rst,
  input  logic       fmb,
  input  logic       bit_eq7,
  output logic       tc
);
  logic [1:0] cnt;
  always_ff @(posedge clka or posedge rst) begin
    if (rst)          cnt <= 2'd0;
    else if (fmb)     cnt <= 2'd0;
    else if (bit_eq7) cnt <= cnt + 2'd1;
  end
  assign tc  = (cnt == 2'd3);
endmodule
