// tx_idle_insert: idle cell insertion counters.
//
// The smallest repeating pattern that matches 21 channels of PCM data to the
// T1 cell rate is 1113 valid cells and 15 idle cells: an idle cell before
// each of 15 groups, three groups of 75 and twelve of 74 valid cells.
// Cell_Count is a 7-bit down counter; its terminal count (zero) is
// InsertIdle, meaning the cell now being sent is idle. On each enable (end of
// a cell after StartToUnload) it counts down, or, at zero, reloads with
// CELL_BASE (74) plus one when Group_Count is 0, 13 or 14. Group_Count is a
// 4-bit down counter enabled by Cell_Count's count-enable-out and reloaded
// with GROUP_LOAD (14) at zero.
//
// Follows the original counters exactly: 7-bit cell counter reloaded with 75
// for group counts 0, 14 and 13 and 74 otherwise, 4-bit group counter
// reloaded with 14.
module tx_idle_insert #(
  parameter int unsigned CELL_BASE  = 74,
  parameter int unsigned GROUP_LOAD = 14
) (
  input  logic       clka,
  input  logic       rst,
  input  logic       ce,
  output logic       insert_idle
);
  logic [6:0] cell_cnt;
  logic [3:0] grp_cnt;
  logic cell_tc, cell_ceo, grp_tc, d0;

  assign cell_tc  = (cell_cnt == 7'd0);
  assign cell_ceo = cell_tc && ce;
  assign grp_tc   = (grp_cnt == 4'd0);
  assign d0       = grp_tc || (grp_cnt == 4'(GROUP_LOAD)) || (grp_cnt == 4'(GROUP_LOAD - 1));

  always_ff @(posedge clka or posedge rst) begin
    if (rst) begin
      cell_cnt <= '0;
      grp_cnt  <= '0;
    end else begin
      if (cell_ceo)  cell_cnt <= 7'(CELL_BASE) + {6'd0, d0};
      else if (ce)   cell_cnt <= cell_cnt - 7'd1;
      if (cell_ceo) begin
        if (grp_tc)  grp_cnt <= 4'(GROUP_LOAD);
        else         grp_cnt <= grp_cnt - 4'd1;
      end
    end
  end

  assign insert_idle = cell_tc;
endmodule
