// rl_le_configurator: applies each program step's configuration to the LEs
// and routers.
//
// In the issue cycle the main controller presents a step's array
// configuration; the configurator registers it so it drives the array during
// the following apply cycle, aligned with the data scheduler's read data. When
// nothing is issued it drives the all-zero configuration, in which every LE
// holds R0/R1. It also guards the RegALU elements (MUL_MASK bit clear): a
// request to load or output a product there is turned into hold / R0 and
// raises the sticky cfg_err flag, cleared by clr_err.
//
// Timing: one register stage, config in at cycle n, applied in cycle n+1.
// The configurator and its cycle-by-cycle reconfiguration of the array follow
// the architecture, which does not describe its insides; the single register
// stage and the RegALU guard are this implementation's choices.
module rl_le_configurator
  import rl_pkg::*;
#(
  parameter logic [NLE-1:0] MUL_MASK = '1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               issue,
  input  array_cfg_t         cfg_in,
  input  logic               clr_err,
  output le_cfg_t [NLE-1:0]  le_cfg,
  output rt_cfg_t [COLS-1:0] rt_cfg,
  output logic               cfg_err
);

  array_cfg_t cfg_fix;
  logic       bad;

  always_comb begin
    cfg_fix = cfg_in;
    bad     = 1'b0;
    for (int i = 0; i < NLE; i++) begin
      if (!MUL_MASK[i]) begin
        if (cfg_in.le[i].r0_sel == RS_MUL) begin cfg_fix.le[i].r0_sel = RS_HOLD; bad = 1'b1; end
        if (cfg_in.le[i].r1_sel == RS_MUL) begin cfg_fix.le[i].r1_sel = RS_HOLD; bad = 1'b1; end
        if (cfg_in.le[i].o0_sel == OS_MUL) begin cfg_fix.le[i].o0_sel = OS_R0;   bad = 1'b1; end
        if (cfg_in.le[i].o1_sel == OS_MUL) begin cfg_fix.le[i].o1_sel = OS_R0;   bad = 1'b1; end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      le_cfg  <= '0;
      rt_cfg  <= '0;
      cfg_err <= 1'b0;
    end else begin
      le_cfg  <= issue ? cfg_fix.le : '0;
      rt_cfg  <= issue ? cfg_fix.rt : '0;
      if (clr_err)          cfg_err <= 1'b0;
      else if (issue && bad) cfg_err <= 1'b1;
    end
  end

endmodule
