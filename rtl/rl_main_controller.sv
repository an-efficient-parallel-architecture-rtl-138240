// rl_main_controller: sequences the program steps held in the program buffer.
//
// After start it issues the step at address 0, repeating each step rep+1
// times with an iteration number 0..rep that the data scheduler uses to step
// its addresses, then moves to the next address. After the last iteration of
// a step with halt set it waits one cycle for that step to be applied, then
// raises done (sticky until the next start) and drops busy. cycles counts the
// cycles from start to done, the run time of the kernel.
//
// Timing: in RUN one step iteration is issued per cycle, with no bubble
// between steps; the issue signals feed the data scheduler and LE
// configurator, which apply them one cycle later. The controller's role
// follows the architecture; the repeat/halt sequencing, the one-step program
// format and the cycle counter are this implementation's choices.
module rl_main_controller
  import rl_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  // program buffer
  output logic [PADDR_W-1:0] pc,
  input  instr_t             instr,
  // issue to the scheduler and configurator
  output logic               issue,
  output logic [ITER_W-1:0]  iter,
  // status
  output logic               busy,
  output logic               done,
  output logic [31:0]        cycles
);

  typedef enum logic [1:0] {IDLE, RUN, DRAIN} state_e;
  state_e state;

  assign issue = (state == RUN);
  assign busy  = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      pc     <= '0;
      iter   <= '0;
      done   <= 1'b0;
      cycles <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          state  <= RUN;
          pc     <= '0;
          iter   <= '0;
          done   <= 1'b0;
          cycles <= '0;
        end
        RUN: begin
          cycles <= cycles + 1;
          if (iter == instr.ctrl.rep) begin
            iter <= '0;
            if (instr.ctrl.halt) state <= DRAIN;
            else                 pc    <= pc + 1'b1;
          end else begin
            iter <= iter + 1'b1;
          end
        end
        DRAIN: begin
          cycles <= cycles + 1;
          state  <= IDLE;
          done   <= 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
