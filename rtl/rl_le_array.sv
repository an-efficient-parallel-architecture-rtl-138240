// rl_le_array: the 4x4 grid of register-in-logic elements with its routers.
//
// Sixteen LEs with two registers each give the 32 registers of the system.
// They stand in COLS columns of ROWS; router c feeds the xR0/xR1 inputs of
// column c from column c-1 (column 0 from the last column, closing a ring),
// from column c itself, or from the data scheduler's read ports. All LE
// outputs are brought out, numbered 2*(c*ROWS+r)+port, for the data scheduler
// to collect results. MUL_MASK bit i makes LE i a RegMUL (with multiplier) and
// clear makes it a RegALU.
//
// Timing: one array step per cycle; the configuration applies to the cycle in
// which it is presented, and every LE register updates at the edge ending it.
//
// The grid, the router per column and the scheduler feeding the routers follow
// the architecture. The ring from the last column back to column 0 and having
// multipliers in every LE by default are this implementation's choices.
module rl_le_array
  import rl_pkg::*;
#(
  parameter logic [NLE-1:0] MUL_MASK = '1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  le_cfg_t [NLE-1:0]   le_cfg,
  input  rt_cfg_t [COLS-1:0]  rt_cfg,
  input  word_t   [NRD-1:0]   sched,
  output word_t   [NOUT-1:0]  le_out,
  output word_t   [NOUT-1:0]  le_reg     // R0/R1 of every LE, same numbering
);

  word_t [COLS-1:0][2*ROWS-1:0] col_out;
  word_t [COLS-1:0][2*ROWS-1:0] col_in;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    rl_router u_router (
      .sel      (rt_cfg[c]),
      .prev_out (col_out[(c + COLS - 1) % COLS]),
      .same_out (col_out[c]),
      .sched    (sched),
      .xin      (col_in[c])
    );
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      localparam int I = c*ROWS + r;
      rl_le #(.HAS_MUL(MUL_MASK[I])) u_le (
        .clk  (clk),
        .rst_n(rst_n),
        .cfg  (le_cfg[I]),
        .xr0  (col_in[c][2*r]),
        .xr1  (col_in[c][2*r+1]),
        .out0 (col_out[c][2*r]),
        .out1 (col_out[c][2*r+1]),
        .r0   (le_reg[2*I]),
        .r1   (le_reg[2*I+1])
      );
      assign le_out[2*I]   = col_out[c][2*r];
      assign le_out[2*I+1] = col_out[c][2*r+1];
    end
  end

endmodule
