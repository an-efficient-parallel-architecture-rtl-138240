// rl_program_buffer: memory of program steps for the main controller.
//
// A program step (rl_pkg::instr_t, IW bits) configures the whole array,
// the data scheduler and the sequencing for one or more cycles. The host
// loads a step as NCHUNK 32-bit chunks, chunk k holding bits [32k+31:32k];
// the controller reads a whole step at once. DEPTH steps.
//
// Timing: chunk writes land at the clock edge; the step read is asynchronous
// (rd_addr to rd_data in the same cycle), so the controller can issue a new
// step every cycle without a fetch bubble. The buffer itself follows the
// architecture; its size, chunked loading and read timing are this
// implementation's choices.
module rl_program_buffer
  import rl_pkg::*;
#(
  parameter int DEPTH = 1 << PADDR_W
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [PADDR_W-1:0]        wr_addr,
  input  logic [$clog2(NCHUNK)-1:0] wr_chunk,
  input  word_t                     wr_data,
  input  logic [PADDR_W-1:0]        rd_addr,
  output instr_t                    rd_data
);

  logic [NCHUNK*32-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && (int'(wr_chunk) < NCHUNK))
      mem[wr_addr][32*wr_chunk +: 32] <= wr_data;
  end

  assign rd_data = instr_t'(mem[rd_addr][IW-1:0]);

endmodule
