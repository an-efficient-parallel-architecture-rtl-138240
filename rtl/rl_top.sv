// rl_top: the 32-register DSP system built from register-in-logic elements.
//
// A host loads data into the data scheduler's memory and program steps into
// the program buffer through the system interface, then starts the main
// controller. Each cycle the controller issues one step iteration; the LE
// configurator and data scheduler apply it in the next cycle to the 4x4 LE
// array: routers steer scheduler words and neighbouring LE outputs into the
// LE registers, every LE computes on its own R0/R1, and the scheduler writes
// one chosen LE output back to memory. When a halting step has been applied
// the controller reports done and the cycle count of the run.
//
// Interface: clk, active-low asynchronous rst_n, the host bus of
// rl_system_interface, and done/busy for polling or interrupts. MUL_MASK
// selects which LEs are RegMUL (bit set) or RegALU.
// Block structure (program buffer, system interface, main controller, data
// scheduler, LE configurator, 16 LEs with column routers) follows the
// architecture; the program format, timing and memory sizes are this
// implementation's choices.
module rl_top
  import rl_pkg::*;
#(
  parameter logic [NLE-1:0] MUL_MASK = '1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [15:0] addr,
  input  word_t       wdata,
  output word_t       rdata,
  output logic        rvalid,
  output logic        busy,
  output logic        done
);

  // system interface <-> blocks
  logic                      dm_we, pb_we, start, clr_err, cfg_err;
  logic [DADDR_W-1:0]        dm_addr;
  word_t                     dm_wdata, dm_rdata, pb_wdata;
  logic [PADDR_W-1:0]        pb_addr;
  logic [$clog2(NCHUNK)-1:0] pb_chunk;
  logic [31:0]               cycles;

  // controller
  logic [PADDR_W-1:0] pc;
  instr_t             instr;
  logic               issue;
  logic [ITER_W-1:0]  iter;

  // array
  le_cfg_t [NLE-1:0]  le_cfg;
  rt_cfg_t [COLS-1:0] rt_cfg;
  word_t   [NRD-1:0]  sched_rd;
  word_t   [NOUT-1:0] le_out;

  rl_system_interface u_sif (
    .clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .rvalid,
    .dm_we, .dm_addr, .dm_wdata, .dm_rdata,
    .pb_we, .pb_addr, .pb_chunk, .pb_wdata,
    .start, .clr_err, .busy, .done, .cfg_err, .cycles
  );

  rl_program_buffer u_pbuf (
    .clk, .wr_en(pb_we), .wr_addr(pb_addr), .wr_chunk(pb_chunk),
    .wr_data(pb_wdata), .rd_addr(pc), .rd_data(instr)
  );

  rl_main_controller u_ctrl (
    .clk, .rst_n, .start, .pc, .instr, .issue, .iter, .busy, .done, .cycles
  );

  rl_le_configurator #(.MUL_MASK(MUL_MASK)) u_cfg (
    .clk, .rst_n, .issue, .cfg_in(instr.arr), .clr_err,
    .le_cfg, .rt_cfg, .cfg_err
  );

  rl_data_scheduler u_sched (
    .clk, .rst_n, .issue, .iter, .cfg(instr.sched),
    .rdata(sched_rd), .le_out,
    .host_we(dm_we), .host_addr(dm_addr), .host_wdata(dm_wdata),
    .host_rdata(dm_rdata)
  );

  rl_le_array #(.MUL_MASK(MUL_MASK)) u_array (
    .clk, .rst_n, .le_cfg, .rt_cfg, .sched(sched_rd), .le_out,
    .le_reg()   // register values are for observation only
  );

endmodule
