// rl_router: the switch in front of one column of logic elements.
//
// Each of the column's 2*ROWS LE inputs (xR0 and xR1 of every row) picks its
// value independently from the outputs of the previous column, the outputs of
// its own column, the data scheduler's read ports, or zero (source numbering in
// rl_pkg). Any LE can so reach any LE of the next column in one cycle and any
// LE of the array in a few cycles, and the connection pattern may change every
// cycle. Purely combinational.
//
// A router per column, fed by the data scheduler, with any-to-any connection
// between neighbouring columns follows the architecture; reaching the router's
// own column and the exact source set are this implementation's choices.
module rl_router
  import rl_pkg::*;
(
  input  rt_cfg_t             sel,
  input  word_t [2*ROWS-1:0]  prev_out,   // previous column, port 2*row+p
  input  word_t [2*ROWS-1:0]  same_out,   // own column
  input  word_t [NRD-1:0]     sched,      // data scheduler read ports
  output word_t [2*ROWS-1:0]  xin         // to xR0/xR1 of the column, 2*row+p
);

  always_comb begin
    for (int i = 0; i < 2*ROWS; i++) begin
      if (sel[i] < SRC_SAME)
        xin[i] = prev_out[sel[i][2:0]];
      else if (sel[i] < SRC_SCHED)
        xin[i] = same_out[sel[i][2:0]];
      else if (sel[i] < SRC_ZERO)
        xin[i] = sched[sel[i][2:0]];
      else
        xin[i] = '0;
    end
  end

endmodule
